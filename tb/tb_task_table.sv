// tb_task_table: fills a four-slot task table through its write port, overwrites one entry,
// writes into a full table, and checks every lookup (hit, procedure, destination) against a
// list of expected entries kept by the testbench, plus the one-cycle lookup latency.
module tb_task_table;
  import savi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic we, lk_req, lk_hit, full;
  task_entry_t wentry;
  task_id_t lk_key;
  proc_id_t lk_proc;
  node_id_t lk_dest;

  task_table #(.ENTRIES(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  task automatic wr(input int t, input int p, input int d);
    wentry = '{task_id: 16'(t), proc_id: 16'(p), dest: 8'(d)};
    we = 1'b1;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic lk(input int t, input bit hit, input int p, input int d);
    lk_key = 16'(t);
    lk_req = 1'b1;
    @(negedge clk);
    lk_req = 1'b0;
    check(lk_hit == hit, $sformatf("task %0d hit=%0d", t, lk_hit));
    if (hit) check(lk_proc == 16'(p) && lk_dest == 8'(d),
                   $sformatf("task %0d -> proc %0d dest %0d", t, lk_proc, lk_dest));
  endtask

  initial begin
    we = 0; lk_req = 0; wentry = '0; lk_key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    lk(1000, 0, 0, 0);
    check(!full, "empty table not full");
    wr(1000, 99, 2);
    wr(1001, 105, 3);
    lk(1000, 1, 99, 2);
    lk(1001, 1, 105, 3);
    lk(1002, 0, 0, 0);
    wr(1000, 7, 9);              // overwrite
    lk(1000, 1, 7, 9);
    lk(1001, 1, 105, 3);
    wr(5, 1, 1);
    check(!full, "three of four slots used");
    wr(6, 2, 2);
    check(full, "table full");
    wr(77, 3, 3);                // dropped
    lk(77, 0, 0, 0);
    lk(5, 1, 1, 1);
    lk(6, 1, 2, 2);
    wr(6, 4, 4);                 // overwrite still allowed when full
    lk(6, 1, 4, 4);
    // the result holds while no lookup is requested
    lk_key = 16'd1001;
    @(negedge clk);
    check(lk_proc == 16'd4 && lk_dest == 8'd4, "result held without lk_req");
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
