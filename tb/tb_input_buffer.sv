// tb_input_buffer: reassembles packages in a small input buffer (64 words, 64-byte fragments,
// so eight fragments at most). Fragments are presented out of order, one is repeated, and
// malformed headers (wrong size, fragment number out of range, package too large, fragment
// count not matching the size) must be refused. While a package is partly assembled, a
// fragment of another package is refused; before anything is committed, it starts the new
// package instead. The buffer contents are read back word by word and compared with the package the
// testbench generated.
module tb_input_buffer;
  import savi_pkg::*;

  localparam int W = 64, FB = 64, FW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic hdr_valid, pay_we, commit, clear, frag_ok, complete;
  comp_hdr_t chdr;
  logic [15:0] pay_idx;
  logic [63:0] pay_data, rd_data;
  task_id_t pkg_task;
  logic [31:0] pkg_size;
  logic [5:0] rd_addr;

  input_buffer #(.BUF_WORDS(W), .FRAG_BYTES(FB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  function automatic logic [63:0] word(input int seed, input int i);
    return {32'(seed * 7919 + i), 32'(i * 2654435761 + seed)};
  endfunction

  // Present one fragment; returns the frag_ok verdict.
  task automatic frag(input int tid, input int size, input int fr, input int tf, input int ts,
                      input int seed, input bit do_commit, output bit accepted);
    chdr = '{task_id: 16'(tid), size: 16'(size), frag: 16'(fr), total_frags: 16'(tf),
             total_size: 32'(ts), input_id: 16'd0};
    hdr_valid = 1'b1;
    @(negedge clk);
    hdr_valid = 1'b0;
    accepted = frag_ok;
    for (int i = 0; i < (size + 7) / 8; i++) begin
      pay_we = 1'b1; pay_idx = 16'(i); pay_data = word(seed, fr * FW + i);
      @(negedge clk);
    end
    pay_we = 1'b0;
    commit = do_commit;
    @(negedge clk);
    commit = 1'b0;
  endtask

  task automatic readback(input int ts, input int seed, input string w);
    int bad = 0;
    for (int i = 0; i < (ts + 7) / 8; i++) begin
      rd_addr = 6'(i);
      @(negedge clk);
      if (rd_data !== word(seed, i)) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d words differ", w, bad));
  endtask

  initial begin
    bit a;
    hdr_valid = 0; pay_we = 0; commit = 0; clear = 0; chdr = '0; pay_idx = 0; pay_data = 0;
    rd_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!complete, "empty after reset");

    // 200 bytes = fragments of 64, 64, 64, 8; order 3, 1, 1 (repeat), 0, 2.
    frag(1000, 8, 3, 4, 200, 1, 1, a);  check(a, "frag 3 accepted");
    check(!complete, "1 of 4");
    frag(1000, 64, 1, 4, 200, 1, 1, a); check(a, "frag 1 accepted");
    frag(1000, 64, 1, 4, 200, 1, 1, a); check(a, "repeated frag 1 accepted");
    frag(1000, 64, 0, 4, 200, 1, 1, a); check(a, "frag 0 accepted");
    check(!complete, "3 of 4, repeat not counted twice");
    // malformed headers
    frag(1000, 60, 2, 4, 200, 1, 1, a); check(!a, "wrong fragment size refused");
    frag(1000, 64, 4, 4, 200, 1, 1, a); check(!a, "fragment number out of range refused");
    frag(1000, 64, 0, 9, 520, 1, 1, a); check(!a, "package larger than the buffer refused");
    frag(1000, 64, 0, 3, 200, 1, 1, a); check(!a, "fragment count not matching size refused");
    check(!complete, "refused fragments change nothing");
    frag(1000, 64, 2, 4, 200, 1, 0, a); check(a, "frag 2 accepted, frame not committed");
    check(!complete, "uncommitted fragment not counted");
    frag(1000, 64, 2, 4, 200, 1, 1, a);
    check(complete, "package complete");
    check(pkg_task == 16'd1000 && pkg_size == 32'd200, "package task and size");
    readback(200, 1, "package 1000");

    // Full buffer: 512 bytes, 8 fragments in reverse order.
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    check(!complete, "cleared");
    for (int f = 7; f >= 0; f--) begin
      frag(5, 64, f, 8, 512, 2, 1, a);
      check(a, $sformatf("full-buffer frag %0d accepted", f));
      check(complete == (f == 0), "complete only after the last fragment");
    end
    readback(512, 2, "full buffer");

    // A fragment of another package is refused once the current one has a committed fragment.
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    frag(6, 64, 0, 2, 100, 3, 1, a);
    frag(7, 36, 1, 2, 100, 4, 1, a);
    check(!a && !complete && pkg_task == 16'd6, "other task refused while assembling");
    frag(6, 64, 0, 2, 120, 4, 1, a);
    check(!a && pkg_size == 32'd100, "other size refused while assembling");
    frag(6, 36, 1, 2, 100, 3, 1, a);
    check(a && complete && pkg_task == 16'd6, "first package completes undisturbed");
    readback(100, 3, "package kept");

    // With nothing committed, a fragment of another package takes the buffer.
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    frag(9, 64, 0, 2, 100, 6, 0, a);
    check(a, "fragment accepted but its frame not committed");
    frag(7, 36, 1, 2, 100, 4, 1, a);
    check(a && !complete && pkg_task == 16'd7, "uncommitted package replaced");
    frag(7, 64, 0, 2, 100, 4, 1, a);
    check(complete && pkg_task == 16'd7, "replacing package complete");
    readback(100, 4, "replacing package");

    // In order: not complete until the last fragment is in.
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    frag(8, 64, 0, 3, 130, 5, 1, a);
    frag(8, 64, 1, 3, 130, 5, 1, a);
    check(!complete, "in order: last fragment missing");
    frag(8, 2, 2, 3, 130, 5, 1, a);
    check(a && complete, "in order: complete");
    readback(130, 5, "in-order package");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
