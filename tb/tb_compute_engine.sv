// tb_compute_engine: runs the engine over packages of 1, 5 and 64 words (and an empty one)
// with a testbench memory in place of the input buffer (one cycle of read latency). Every
// write must carry the word read from the same address (the identity procedure), every
// address must be written exactly once, and done must rise N+1 clock edges after the
// edge that takes start.
module tb_compute_engine;
  import savi_pkg::*;

  localparam int W = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, out_we, busy, done;
  logic [6:0] nwords;
  proc_id_t proc_id;
  logic [5:0] in_rd_addr, out_waddr;
  logic [63:0] in_rd_data, out_wdata;
  logic [63:0] src [W];
  logic [63:0] dst [W];
  int          nwr [W];

  compute_engine #(.BUF_WORDS(W)) dut (.*);

  always_ff @(posedge clk) in_rd_data <= src[in_rd_addr];
  always_ff @(posedge clk) if (out_we) begin
    dst[out_waddr] <= out_wdata;
    nwr[out_waddr] <= nwr[out_waddr] + 1;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  task automatic run(input int n, input int seed);
    int cyc = 0, bad = 0, cnt = 0;
    foreach (src[i]) begin
      src[i] = {32'($urandom), 32'(i * 31 + seed)};
      dst[i] = '0;
      nwr[i] = 0;
    end
    nwords = 7'(n); proc_id = 16'(seed);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 200) begin
      @(negedge clk);
      cyc++;
    end
    check(done, $sformatf("%0d words: done", n));
    // start is taken at the first edge; done is high N+1 edges later.
    check(cyc == (n == 0 ? 1 : n + 2),
          $sformatf("%0d words: done after %0d cycles, expected %0d", n, cyc,
                    n == 0 ? 1 : n + 2));
    @(negedge clk);
    check(!busy, "idle after done");
    for (int i = 0; i < W; i++) begin
      if (i < n && (dst[i] !== src[i] || nwr[i] != 1)) bad++;
      if (i >= n && nwr[i] != 0) bad++;
      cnt += nwr[i];
    end
    check(bad == 0 && cnt == n, $sformatf("%0d words: %0d addresses wrong", n, bad));
  endtask

  initial begin
    start = 0; nwords = 0; proc_id = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(1, 1);
    run(5, 2);
    run(64, 3);
    run(0, 4);
    run(25, 5);
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
