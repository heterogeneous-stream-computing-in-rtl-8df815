// tb_output_buffer: writes a package into a small output buffer (64 words, 64-byte fragments)
// and reads it back, then steps the fragment sequence for several package sizes and checks
// each fragment's number, size, start address, the fragment count and the last-fragment flag
// against sizes the testbench works out by division.
module tb_output_buffer;
  import savi_pkg::*;

  localparam int W = 64, FB = 64, FW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic we, load, advance, last_frag;
  logic [5:0] waddr, rd_addr, cur_base;
  logic [63:0] wdata, rd_data;
  logic [31:0] pkg_size;
  logic [15:0] cur_frag, cur_bytes, nfrags;

  output_buffer #(.BUF_WORDS(W), .FRAG_BYTES(FB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  task automatic seq(input int size);
    int tf = (size + FB - 1) / FB;
    pkg_size = 32'(size);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(nfrags == 16'(tf), $sformatf("size %0d: %0d fragments, expected %0d", size, nfrags,
                                       tf));
    for (int f = 0; f < tf; f++) begin
      int sz = (f == tf - 1) ? size - f * FB : FB;
      check(cur_frag == 16'(f) && cur_bytes == 16'(sz) && cur_base == 6'(f * FW) &&
            last_frag == (f == tf - 1),
            $sformatf("size %0d frag %0d: got frag %0d bytes %0d base %0d last %0d", size, f,
                      cur_frag, cur_bytes, cur_base, last_frag));
      advance = 1'b1;
      @(negedge clk);
      advance = 1'b0;
    end
    check(last_frag && cur_frag == 16'(tf - 1), "advance past the last fragment is ignored");
  endtask

  initial begin
    int bad = 0;
    we = 0; load = 0; advance = 0; waddr = 0; wdata = 0; rd_addr = 0; pkg_size = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < W; i++) begin
      we = 1'b1; waddr = 6'(i); wdata = {32'(i * 977), 32'(~i)};
      @(negedge clk);
    end
    we = 1'b0;
    for (int i = 0; i < W; i++) begin
      rd_addr = 6'(W - 1 - i);
      @(negedge clk);
      if (rd_data !== {32'((W - 1 - i) * 977), 32'(~(W - 1 - i))}) bad++;
    end
    check(bad == 0, $sformatf("memory read back, %0d words differ", bad));
    seq(200);
    seq(64);
    seq(512);
    seq(1);
    seq(129);
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
