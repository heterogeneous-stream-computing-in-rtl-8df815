// tb_frame_tx: sends acknowledgements and data frames through the transmitter, with a
// testbench memory in place of the output buffer, and compares the bytes on the stream (using
// tkeep) with frames built byte by byte by the testbench. With tx_tready held high a frame must
// leave in consecutive cycles (one beat per cycle, no gaps); with random back-pressure the
// contents must be unchanged.
module tb_frame_tx;
  import savi_pkg::*;
  import tb_pkg::*;

  localparam int W = 256;
  localparam logic [47:0] ME = 48'h02aabbccddee, YOU = 48'hfa163e152650;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, is_ack, tx_tvalid, tx_tlast, tx_tready, busy, done;
  mac_t my_mac, dst_mac;
  logic [63:0] echo, rd_data, tx_tdata;
  comp_hdr_t chdr;
  logic [7:0] pay_base, rd_addr, tx_tkeep;
  logic [63:0] mem [W];

  frame_tx #(.BUF_WORDS(W)) dut (.*);
  always_ff @(posedge clk) rd_data <= mem[rd_addr];

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  bit bp = 1'b0;
  always @(negedge clk) tx_tready <= bp ? ($urandom_range(0, 2) != 0) : 1'b1;

  bytes_t got;
  int beats, first, lastc, cyc;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (tx_tvalid && tx_tready) begin
    if (beats == 0) first = cyc;
    lastc = cyc;
    beats++;
    for (int i = 0; i < 8; i++) if (tx_tkeep[i]) got.push_back(tx_tdata[8*i +: 8]);
  end

  function automatic bit same(input bytes_t a, input bytes_t b);
    if (a.size() != b.size()) return 1'b0;
    foreach (a[i]) if (a[i] !== b[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic go(input bytes_t exp, input string w);
    got = {}; beats = 0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(same(got, exp), $sformatf("%s: %0d bytes sent, %0d expected", w, got.size(),
                                    exp.size()));
    if (!bp) check(lastc - first == beats - 1, $sformatf("%s: gaps in the frame", w));
    check(beats == (exp.size() + 7) / 8, $sformatf("%s: %0d beats", w, beats));
  endtask

  task automatic data(input int size, input int base, input int fr);
    bytes_t pkg, dummy;
    // package bytes as laid out in memory from word 'base'
    for (int i = 0; i < (base * 8); i++) pkg.push_back(8'h00);
    for (int i = 0; i < W * 8 - base * 8; i++) pkg.push_back(mem[base + i / 8][8*(i%8) +: 8]);
    is_ack = 1'b0; dst_mac = YOU; pay_base = 8'(base);
    chdr = '{task_id: 16'd1000, size: 16'(size), frag: 16'(fr), total_frags: 16'd3,
             total_size: 32'd3000, input_id: 16'd0};
    go(data_frame(YOU, ME, 16'd1000, size, fr, 3, 3000, pkg, base * 8),
       $sformatf("data %0d bytes", size));
  endtask

  initial begin
    bytes_t f;
    start = 0; is_ack = 0; dst_mac = 0; echo = 0; chdr = '0; pay_base = 0; my_mac = ME;
    cyc = 0;
    foreach (mem[i]) mem[i] = {$urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // ACK of a frame whose bytes 14..21 are 03 e8 00 c8 00 01 00 04
    f = data_frame(ME, YOU, 16'd1000, 200, 1, 4, 1000, make_pkg(2000, 1), 0);
    is_ack = 1'b1; dst_mac = YOU;
    echo = {f[21], f[20], f[19], f[18], f[17], f[16], f[15], f[14]};
    go(ack_frame(YOU, ME, f), "ack");
    data(200, 0, 0);
    data(8, 5, 1);
    data(13, 7, 2);
    data(1480, 40, 0);
    data(0, 0, 0);
    bp = 1'b1;
    data(333, 9, 1);
    is_ack = 1'b1;
    go(ack_frame(YOU, ME, f), "ack under back-pressure");
    data(1480, 30, 0);
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
