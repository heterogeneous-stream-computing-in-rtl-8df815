// tb_node_ctrl: drives the controller's status inputs directly, standing in for the receiver,
// buffers, tables, compute engine and transmitter, and checks the commands it gives in each
// step of the node's flow: acknowledge a data or control frame to its sender, drop a bad one,
// commit accepted fragments, look up task then node for a complete package, start the
// procedure with the right word count, load and step the output fragments, send each one to
// the node's address and wait for the matching ACK (ignoring a wrong one), and drop a package
// whose task is unknown or whose address is not an Ethernet one.
module tb_node_ctrl;
  import savi_pkg::*;

  localparam int W = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic rx_en, rx_ack_only, rx_done, rx_ok;
  frame_kind_e rx_kind;
  mac_t rx_src, nt_addr, tx_dst;
  logic [63:0] rx_echo, tx_echo;
  logic ib_frag_ok, ib_complete, ib_commit, ib_clear;
  task_id_t ib_task, tt_lk_key;
  logic [31:0] ib_size, ob_size;
  logic tt_lk_req, tt_hit, nt_lk_req, nt_hit;
  proc_id_t tt_proc, ce_proc;
  node_id_t tt_dest, nt_lk_key;
  logic [7:0] nt_type;
  logic ce_start, ce_done, ob_load, ob_advance, ob_last, tx_start, tx_is_ack, tx_done;
  logic [8:0] ce_nwords;
  logic [15:0] ob_frag, ob_bytes, ob_nfrags;
  comp_hdr_t tx_chdr;
  logic [3:0] state_o;

  node_ctrl #(.BUF_WORDS(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // Count command pulses.
  int n_commit, n_clear, n_tt, n_nt, n_ce, n_load, n_adv, n_tx;
  always @(posedge clk) begin
    n_commit += int'(ib_commit); n_clear += int'(ib_clear); n_tt += int'(tt_lk_req);
    n_nt += int'(nt_lk_req); n_ce += int'(ce_start); n_load += int'(ob_load);
    n_adv += int'(ob_advance); n_tx += int'(tx_start);
  end
  task automatic zero();
    n_commit = 0; n_clear = 0; n_tt = 0; n_nt = 0; n_ce = 0; n_load = 0; n_adv = 0; n_tx = 0;
  endtask

  // Present a finished frame for one cycle.
  task automatic frame(input frame_kind_e k, input bit good, input mac_t src,
                       input logic [63:0] ech);
    rx_done = 1'b1; rx_kind = k; rx_ok = good; rx_src = src; rx_echo = ech;
    @(negedge clk);
    rx_done = 1'b0;
  endtask

  // Wait up to n cycles for tx_start; check its kind and destination.
  task automatic expect_tx(input bit ack, input mac_t dst, input string w);
    int i = 0;
    while (!tx_start && i < 20) begin @(negedge clk); i++; end
    check(tx_start && tx_is_ack == ack && tx_dst == dst, {w, ": transmit started"});
    @(negedge clk);
  endtask

  task automatic finish_tx();
    repeat (3) @(negedge clk);
    tx_done = 1'b1;
    @(negedge clk);
    tx_done = 1'b0;
  endtask

  localparam mac_t UP = 48'hfa163e2076e6, DOWN = 48'hfa163e152650;

  initial begin
    rx_done = 0; rx_ok = 0; rx_kind = K_OTHER; rx_src = 0; rx_echo = 0; ib_frag_ok = 0;
    ib_complete = 0; ib_task = 0; ib_size = 0; tt_hit = 0; tt_proc = 0; tt_dest = 0;
    nt_hit = 0; nt_type = 0; nt_addr = 0; ce_done = 0; ob_frag = 0; ob_bytes = 0;
    ob_nfrags = 0; ob_last = 0; tx_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(rx_en && !rx_ack_only, "idle: receiving");

    // Control frame -> ACK to its sender, no commit.
    zero();
    frame(K_CTRL, 1'b1, UP, 64'h1122334455667788);
    expect_tx(1'b1, UP, "control ACK");
    check(tx_echo == 64'h1122334455667788, "control ACK echo");
    check(!rx_en, "no frame read while acknowledging");
    finish_tx();
    check(rx_en && n_commit == 0, "back to receiving, nothing committed");

    // Bad frame and refused fragment -> dropped.
    zero();
    frame(K_CTRL, 1'b0, UP, '0);
    ib_frag_ok = 1'b0;
    frame(K_DATA, 1'b1, UP, '0);
    frame(K_ACK, 1'b1, DOWN, '0);
    repeat (5) @(negedge clk);
    check(n_tx == 0 && n_commit == 0 && rx_en, "bad, refused and unexpected frames dropped");

    // Accepted fragment of an incomplete package -> commit, ACK, back.
    zero();
    ib_frag_ok = 1'b1;
    rx_done = 1'b1; rx_kind = K_DATA; rx_ok = 1'b1; rx_src = UP; rx_echo = 64'hAB;
    #1 check(ib_commit, "fragment committed with done");
    @(negedge clk);
    rx_done = 1'b0;
    expect_tx(1'b1, UP, "fragment ACK");
    finish_tx();
    check(rx_en && n_commit == 1 && n_tt == 0, "incomplete package: no lookup");

    // Last fragment: package of 3000 bytes, task 1000 -> proc 99, node 2 -> DOWN.
    zero();
    ib_task = 16'd1000; ib_size = 32'd3000;
    tt_hit = 1'b1; tt_proc = 16'd99; tt_dest = 8'd2;
    nt_hit = 1'b1; nt_type = ADDR_TYPE_ETH; nt_addr = DOWN;
    frame(K_DATA, 1'b1, UP, 64'hCD);
    ib_complete = 1'b1;
    expect_tx(1'b1, UP, "last fragment ACK");
    finish_tx();
    repeat (6) @(negedge clk);
    check(n_tt == 1 && n_nt == 1, "task and node looked up");
    check(tt_lk_key == 16'd1000 && nt_lk_key == 8'd2, "lookup keys");
    check(n_ce == 1 && ce_nwords == 9'd375 && ce_proc == 16'd99, "procedure started");
    repeat (10) @(negedge clk);
    check(n_tx == 1, "no forwarding before the procedure ends");
    ce_done = 1'b1;
    #1 check(ib_clear && ob_load && ob_size == 32'd3000, "input freed, output loaded");
    @(negedge clk);
    ce_done = 1'b0; ib_complete = 1'b0;
    ob_frag = 16'd0; ob_bytes = 16'd1480; ob_nfrags = 16'd3; ob_last = 1'b0;
    expect_tx(1'b0, DOWN, "fragment 0 forwarded");
    check(tx_chdr.task_id == 16'd1000 && tx_chdr.frag == 16'd0 && tx_chdr.size == 16'd1480 &&
          tx_chdr.total_frags == 16'd3 && tx_chdr.total_size == 32'd3000, "fragment 0 header");
    finish_tx();
    check(rx_en && rx_ack_only, "waiting for the ACK");
    // wrong fragment number, wrong sender, then a data frame: all ignored
    frame(K_ACK, 1'b1, DOWN, {16'h0300, 16'h0100, 16'h0, 16'he803});
    frame(K_ACK, 1'b1, UP,   {16'h0300, 16'h0000, 16'h0, 16'he803});
    frame(K_DATA, 1'b1, UP, '0);
    repeat (3) @(negedge clk);
    check(n_adv == 0 && n_tx == 2 && rx_ack_only && n_commit == 1,
          "wrong ACKs and a data frame ignored while waiting");
    // matching ACK (task 1000 = 03e8, fragment 0)
    rx_done = 1'b1; rx_kind = K_ACK; rx_ok = 1'b1; rx_src = DOWN;
    rx_echo = {16'h0300, 16'h0000, 16'hc805, 16'he803};
    #1 check(ob_advance, "matching ACK advances the fragment");
    @(negedge clk);
    rx_done = 1'b0;
    ob_frag = 16'd1;
    expect_tx(1'b0, DOWN, "fragment 1 forwarded");
    finish_tx();
    frame(K_ACK, 1'b1, DOWN, {16'h0300, 16'h0100, 16'hc805, 16'he803});
    // the testbench plays the output buffer, which has moved on to the last fragment
    ob_frag = 16'd2; ob_last = 1'b1; ob_bytes = 16'd40;
    expect_tx(1'b0, DOWN, "fragment 2 forwarded");
    check(tx_chdr.frag == 16'd2 && tx_chdr.size == 16'd40, "fragment 2 header");
    finish_tx();
    frame(K_ACK, 1'b1, DOWN, {16'h0300, 16'h0200, 16'h2800, 16'he803});
    @(negedge clk);
    check(rx_en && !rx_ack_only && n_adv == 2, "package done, receiving again");

    // Unknown task -> package dropped.
    zero();
    tt_hit = 1'b0;
    frame(K_DATA, 1'b1, UP, '0);
    ib_complete = 1'b1;
    expect_tx(1'b1, UP, "ACK before the lookup");
    finish_tx();
    repeat (5) @(negedge clk);
    ib_complete = 1'b0;
    check(n_clear == 1 && n_ce == 0 && rx_en, "unknown task: package dropped");

    // Non-Ethernet address type -> dropped.
    zero();
    tt_hit = 1'b1; nt_type = 8'd2;
    frame(K_DATA, 1'b1, UP, '0);
    ib_complete = 1'b1;
    expect_tx(1'b1, UP, "ACK before the lookup");
    finish_tx();
    repeat (5) @(negedge clk);
    ib_complete = 1'b0;
    check(n_clear == 1 && n_ce == 0 && rx_en, "non-Ethernet address: package dropped");

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
