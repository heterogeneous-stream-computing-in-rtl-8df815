// tb_node_table: fills a four-slot node table through its write port, overwrites one entry,
// writes into a full table, and checks every lookup (hit, address type, address) against the
// values the testbench wrote, plus the one-cycle lookup latency.
module tb_node_table;
  import savi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic we, lk_req, lk_hit, full;
  node_entry_t wentry;
  node_id_t lk_key;
  logic [7:0] lk_type;
  mac_t lk_addr;

  node_table #(.ENTRIES(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  task automatic wr(input int n, input int t, input logic [47:0] a);
    wentry = '{node_id: 8'(n), addr_type: 8'(t), addr: a};
    we = 1'b1;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic lk(input int n, input bit hit, input int t, input logic [47:0] a);
    lk_key = 8'(n);
    lk_req = 1'b1;
    @(negedge clk);
    lk_req = 1'b0;
    check(lk_hit == hit, $sformatf("node %0d hit=%0d", n, lk_hit));
    if (hit) check(lk_type == 8'(t) && lk_addr == a,
                   $sformatf("node %0d -> type %0d addr %h", n, lk_type, lk_addr));
  endtask

  initial begin
    we = 0; lk_req = 0; wentry = '0; lk_key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    lk(2, 0, 0, 0);
    wr(2, 1, 48'hfabc10331155);
    wr(3, 1, 48'haab1c3d9ef11);
    lk(2, 1, 1, 48'hfabc10331155);
    lk(3, 1, 1, 48'haab1c3d9ef11);
    lk(4, 0, 0, 0);
    wr(2, 2, 48'h0a0b0c0d0e0f);  // overwrite
    lk(2, 1, 2, 48'h0a0b0c0d0e0f);
    wr(1, 1, 48'h111111111111);
    check(!full, "three of four slots used");
    wr(9, 1, 48'h999999999999);
    check(full, "table full");
    wr(8, 1, 48'h888888888888); // dropped
    lk(8, 0, 0, 0);
    lk(1, 1, 1, 48'h111111111111);
    lk(9, 1, 1, 48'h999999999999);
    lk(3, 1, 1, 48'haab1c3d9ef11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
