// tb_frame_rx: sends data, control, acknowledgement, padded, truncated and foreign frames into
// the receiver with random gaps and checks what it reports: the compute header fields, every
// payload word with its index, every table entry with the opcode, and at the end of each frame
// its kind, verdict, source address and echoed bytes, all against the frames the testbench
// built. With ack_only set, data and control frames must produce no writes.
module tb_frame_rx;
  import savi_pkg::*;
  import tb_pkg::*;

  localparam logic [47:0] ME = 48'hfa163e4d5a60, YOU = 48'hfa163e2076e6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mac_t my_mac, src_mac;
  logic en, ack_only, rx_tvalid, rx_tlast, rx_tready, hdr_valid, pay_we, ent_we, done, ok;
  logic [63:0] rx_tdata, pay_data, ent_data, echo;
  logic [7:0] rx_tkeep;
  comp_hdr_t chdr;
  logic [15:0] pay_idx, ent_op;
  frame_kind_e kind;

  frame_rx #(.FRAG_BYTES(1480)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // Records of what the receiver reported.
  int n_hdr, n_done;
  comp_hdr_t hdr_seen;
  logic [63:0] pay_seen[$], ent_seen[$];
  logic [15:0] idx_seen[$], op_seen[$];
  frame_kind_e kind_seen;
  logic ok_seen;
  mac_t src_seen;
  logic [63:0] echo_seen;
  always @(posedge clk) begin
    if (hdr_valid) begin n_hdr++; hdr_seen = chdr; end
    if (pay_we) begin pay_seen.push_back(pay_data); idx_seen.push_back(pay_idx); end
    if (ent_we) begin ent_seen.push_back(ent_data); op_seen.push_back(ent_op); end
    if (done) begin
      n_done++; kind_seen = kind; ok_seen = ok; src_seen = src_mac; echo_seen = echo;
    end
  end

  task automatic send(input bytes_t f);
    beats_t b;
    b = to_beats(f);
    n_hdr = 0; n_done = 0; pay_seen = {}; ent_seen = {}; idx_seen = {}; op_seen = {};
    @(negedge clk);
    for (int i = 0; i < b.size(); i++) begin
      rx_tvalid = 1'b0;
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      rx_tdata = b[i]; rx_tkeep = 8'hFF; rx_tlast = (i == b.size() - 1); rx_tvalid = 1'b1;
      @(posedge clk);
      while (!rx_tready) @(posedge clk);
      @(negedge clk);
    end
    rx_tvalid = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  function automatic logic [63:0] beat_of(input bytes_t f, input int off);
    logic [63:0] w = '0;
    for (int i = 0; i < 8; i++) if (off + i < f.size()) w[8*i +: 8] = f[off + i];
    return w;
  endfunction

  task automatic expect_end(input frame_kind_e k, input bit good, input bytes_t f,
                            input string w);
    check(n_done == 1, {w, ": one done"});
    check(kind_seen == k && ok_seen == good,
          $sformatf("%s: kind %0d ok %0d", w, kind_seen, ok_seen));
    check(src_seen == YOU, {w, ": source"});
    check(echo_seen == beat_of(f, 14), {w, ": echo"});
  endtask

  initial begin
    bytes_t f, pkg, e, padded;
    en = 1'b1; ack_only = 1'b0; my_mac = ME; rx_tvalid = 0; rx_tlast = 0; rx_tdata = 0;
    rx_tkeep = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Data frame: 100 bytes of fragment 2 of a 3060-byte package.
    pkg = make_pkg(3060, 7);
    f = data_frame(ME, YOU, 16'd1001, 100, 2, 3, 3060, pkg, 2960);
    send(f);
    check(n_hdr == 1, "data: one header");
    check(hdr_seen.task_id == 16'd1001 && hdr_seen.size == 16'd100 && hdr_seen.frag == 16'd2 &&
          hdr_seen.total_frags == 16'd3 && hdr_seen.total_size == 32'd3060 &&
          hdr_seen.input_id == 16'd0, "data: header fields");
    check(pay_seen.size() == 13, $sformatf("data: %0d payload words", pay_seen.size()));
    for (int i = 0; i < pay_seen.size(); i++)
      check(idx_seen[i] == 16'(i) && pay_seen[i] == beat_of(f, 32 + 8 * i),
            $sformatf("data: payload word %0d", i));
    expect_end(K_DATA, 1'b1, f, "data");

    // The same frame padded with extra beats: padding is not written.
    padded = f;
    repeat (40) padded.push_back(8'hEE);
    send(padded);
    check(pay_seen.size() == 13, "padded data: padding ignored");
    expect_end(K_DATA, 1'b1, padded, "padded data");

    // Truncated data frame: refused.
    f = data_frame(ME, YOU, 16'd1001, 100, 2, 3, 3060, pkg, 2960);
    f = f[0:63];
    send(f);
    expect_end(K_DATA, 1'b0, f, "truncated data");

    // Fragment larger than a frame payload: refused.
    f = data_frame(ME, YOU, 16'd1, 1488, 0, 2, 2000, make_pkg(2000, 1), 0);
    send(f);
    expect_end(K_DATA, 1'b0, f, "oversized fragment");

    // Control frame: add two tasks.
    e = {};
    task_entry(e, 16'd1000, 16'd99, 8'd2);
    task_entry(e, 16'd1001, 16'd105, 8'd3);
    f = ctrl_frame(ME, YOU, 16'h0002, e);
    repeat (24) f.push_back(8'h00);        // padding beats must not become entries
    send(f);
    check(ent_seen.size() == 2, $sformatf("ctrl: %0d entries", ent_seen.size()));
    if (ent_seen.size() == 2) begin
      check(ent_seen[0] == beat_of(e, 0) && ent_seen[1] == beat_of(e, 8), "ctrl: entry data");
      check(op_seen[0] == 16'h0002 && op_seen[1] == 16'h0002, "ctrl: opcode");
    end
    expect_end(K_CTRL, 1'b1, f, "ctrl");

    // Control frame with an unknown opcode: no entries, refused.
    f = ctrl_frame(ME, YOU, 16'h0009, e);
    send(f);
    check(ent_seen.size() == 0, "bad opcode: no entries");
    expect_end(K_CTRL, 1'b0, f, "bad opcode");

    // Acknowledgement.
    f = ack_frame(ME, YOU, data_frame(YOU, ME, 16'd1000, 8, 0, 1, 8, make_pkg(8, 2), 0));
    send(f);
    expect_end(K_ACK, 1'b1, f, "ack");

    // Frames for another address: no writes, refused.
    f = data_frame(YOU, YOU, 16'd1001, 100, 2, 3, 3060, pkg, 2960);
    send(f);
    check(n_hdr == 0 && pay_seen.size() == 0, "foreign: no writes");
    expect_end(K_DATA, 1'b0, f, "foreign");

    // ack_only: data and control frames produce no writes.
    ack_only = 1'b1;
    f = data_frame(ME, YOU, 16'd1001, 100, 2, 3, 3060, pkg, 2960);
    send(f);
    check(n_hdr == 0 && pay_seen.size() == 0, "ack_only: no data writes");
    f = ctrl_frame(ME, YOU, 16'h0002, e);
    send(f);
    check(ent_seen.size() == 0, "ack_only: no entries");
    ack_only = 1'b0;

    // Not enabled: the frame waits.
    en = 1'b0;
    rx_tvalid = 1'b1; rx_tdata = '1; rx_tlast = 1'b1;
    repeat (5) @(negedge clk);
    check(!rx_tready, "not enabled: frame held back");
    rx_tvalid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
