// tb_savi_fpga_node: end-to-end test of the FPGA compute node at its default sizes. The node
// under test plays node 2 of a three-node chain; the testbench plays the supervisor/user
// machine (node 1) and node 3, with the addresses, address type, task routes, procedure ID and
// 200-byte package of the chain test configuration. It programs both tables through control
// frames, then sends packages and checks every frame the node sends: each acknowledgement
// (destination, EtherType, echoed bytes) and each forwarded fragment (destination, header,
// payload bytes, length), all worked out from the frames the testbench sent.
//
// Mechanisms made to happen and counted: control frames of both kinds, acknowledgements,
// single- and multi-fragment forwarding, out-of-order and repeated fragments, a package that
// fills the whole input buffer, output back-pressure, a held-back downstream ACK (the node
// waits), a wrong ACK (ignored), a data frame during the wait (dropped without ACK), an
// unknown task (package dropped), a frame for another address (ignored), an oversized package
// (refused without ACK), a task entry overwritten and a fragment of a second package refused
// while the first is partly assembled. The latency from the last beat of a
// one-fragment package to the first beat of the forwarded frame is checked against the
// node's pipeline: 14 cycles plus one per payload word.

module tb_savi_fpga_node;
  import tb_pkg::*;

  localparam logic [47:0] MAC1 = 48'hfa163e2076e6;   // node 1: user / control machine
  localparam logic [47:0] MAC2 = 48'hfa163e4d5a60;   // node 2: the node under test
  localparam logic [47:0] MAC3 = 48'hfa163e152650;   // node 3
  localparam int FRAG = 1480;
  localparam int BUF_BYTES = 2048 * 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] rx_tdata, tx_tdata;
  logic [7:0]  rx_tkeep, tx_tkeep;
  logic        rx_tvalid, rx_tlast, rx_tready, tx_tvalid, tx_tlast, tx_tready;
  logic [3:0]  state;

  savi_fpga_node dut (
    .clk, .rst_n, .my_mac(MAC2),
    .rx_tdata, .rx_tkeep, .rx_tvalid, .rx_tlast, .rx_tready,
    .tx_tdata, .tx_tkeep, .tx_tvalid, .tx_tlast, .tx_tready, .state
  );

  always @(posedge clk) begin
  end
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Mechanism counters.
  int n_ctrl_nodes = 0, n_ctrl_tasks = 0, n_acks = 0, n_fwd_frames = 0, n_multi_frag = 0;
  int n_out_of_order = 0, n_duplicate = 0, n_full_buffer = 0, n_backpressure = 0;
  int n_wait_stall = 0, n_wrong_ack = 0, n_drop_in_wait = 0, n_unknown_task = 0;
  int n_foreign = 0, n_oversize = 0, n_overwrite = 0, n_buf_held = 0;

  // ---------------- transmit side: collect frames the node sends ----------------
  bytes_t tx_frames[$];
  int     tx_first_cycle[$];
  bit     bp_on = 1'b0;
  bytes_t cur_tx;
  int     cur_first;
  always @(posedge clk) begin
    if (tx_tvalid && !tx_tready) n_backpressure++;
    if (tx_tvalid && tx_tready) begin
      if (cur_tx.size() == 0) cur_first = cycle;
      for (int i = 0; i < 8; i++) if (tx_tkeep[i]) cur_tx.push_back(tx_tdata[8*i +: 8]);
      if (tx_tlast) begin
        tx_frames.push_back(cur_tx);
        tx_first_cycle.push_back(cur_first);
        cur_tx = {};
      end
    end
  end
  always @(negedge clk) tx_tready <= bp_on ? ($urandom_range(0, 3) != 0) : 1'b1;

  // ---------------- receive side: send frames to the node ----------------
  bit gaps = 1'b0;
  int last_beat_cycle;
  always @(posedge clk) if (rx_tvalid && rx_tready && rx_tlast) last_beat_cycle = cycle;
  task automatic send(input bytes_t f);
    beats_t b;
    b = to_beats(f);
    for (int i = 0; i < b.size(); i++) begin
      if (gaps) begin
        while ($urandom_range(0, 2) == 0) begin
          rx_tvalid <= 1'b0;
          @(posedge clk);
        end
      end
      rx_tdata  <= b[i];
      rx_tkeep  <= (i == b.size() - 1 && f.size() % 8 != 0) ? 8'((1 << (f.size() % 8)) - 1)
                                                             : 8'hFF;
      rx_tlast  <= (i == b.size() - 1);
      rx_tvalid <= 1'b1;
      @(posedge clk);
      while (!rx_tready) @(posedge clk);
    end
    rx_tvalid <= 1'b0;
  endtask

  // Wait for the next frame from the node; returns 0 on timeout.
  task automatic get(output bytes_t f, input int max_cycles, output bit got);
    got = 1'b0;
    for (int i = 0; i < max_cycles; i++) begin
      if (tx_frames.size() != 0) begin
        f = tx_frames.pop_front();
        void'(tx_first_cycle.pop_front());
        got = 1'b1;
        return;
      end
      @(posedge clk);
    end
  endtask

  function automatic bit same(input bytes_t a, input bytes_t b);
    if (a.size() != b.size()) return 1'b0;
    foreach (a[i]) if (a[i] !== b[i]) return 1'b0;
    return 1'b1;
  endfunction

  // Send frame f and expect its acknowledgement to src.
  task automatic send_expect_ack(input bytes_t f, input logic [47:0] src, input string what);
    bytes_t r;
    bit got;
    send(f);
    get(r, 200, got);
    check(got, {what, ": ACK arrives"});
    if (got) begin
      check(same(r, ack_frame(src, MAC2, f)), {what, ": ACK contents"});
      n_acks++;
    end
  endtask

  // Expect nothing from the node for a while.
  task automatic expect_silence(input int n, input string what);
    repeat (n) @(posedge clk);
    check(tx_frames.size() == 0, {what, ": no frame sent"});
    tx_frames = {};
    tx_first_cycle = {};
  endtask

  // Send a package as fragments in the given order and expect one ACK per fragment.
  task automatic send_pkg(input logic [15:0] tid, input bytes_t pkg, input int order[$],
                          input logic [47:0] src);
    int tf = (pkg.size() + FRAG - 1) / FRAG;
    foreach (order[k]) begin
      int fr = order[k];
      int sz = (fr == tf - 1) ? pkg.size() - fr * FRAG : FRAG;
      send_expect_ack(data_frame(MAC2, src, tid, sz, fr, tf, pkg.size(), pkg, fr * FRAG),
                      src, $sformatf("task %0d fragment %0d", tid, fr));
    end
  endtask

  // Receive the forwarded package to dst, acknowledging each fragment.
  task automatic recv_pkg(input logic [15:0] tid, input bytes_t pkg, input logic [47:0] dst,
                          input bit disturb);
    int tf = (pkg.size() + FRAG - 1) / FRAG;
    bytes_t r, exp;
    bit got;
    for (int fr = 0; fr < tf; fr++) begin
      int sz = (fr == tf - 1) ? pkg.size() - fr * FRAG : FRAG;
      get(r, 20000, got);
      check(got, $sformatf("task %0d forwarded fragment %0d arrives", tid, fr));
      if (!got) return;
      exp = data_frame(dst, MAC2, tid, sz, fr, tf, pkg.size(), pkg, fr * FRAG);
      check(same(r, exp), $sformatf("task %0d forwarded fragment %0d contents", tid, fr));
      n_fwd_frames++;
      if (disturb && fr == 0) begin
        bytes_t wrong, other;
        // The node must wait: hold the ACK back.
        repeat (50) @(posedge clk);
        check(state == 4'd10, "node waits for the downstream ACK");
        n_wait_stall++;
        // An ACK for another fragment number is ignored.
        wrong = r;
        wrong[19] = wrong[19] + 8'd1;
        send(ack_frame(MAC2, dst, wrong));
        n_wrong_ack++;
        // A data frame arriving meanwhile is dropped without an acknowledgement.
        other = data_frame(MAC2, MAC1, 16'd1, 8, 0, 1, 8, make_pkg(8, 9), 0);
        send(other);
        n_drop_in_wait++;
        expect_silence(100, "wrong ACK and data frame during the wait");
      end
      send(ack_frame(MAC2, dst, r));
    end
  endtask

  initial begin
    bytes_t e, pkg, r;
    bit got;
    int order[$];
    rx_tvalid = 1'b0; rx_tlast = 1'b0; rx_tdata = '0; rx_tkeep = '0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);

    // Program the node (chain-test configuration: address type 1, procedure 1).
    e = {};
    node_entry(e, 8'd1, 8'd1, MAC1);
    node_entry(e, 8'd2, 8'd1, MAC2);
    node_entry(e, 8'd3, 8'd1, MAC3);
    send_expect_ack(ctrl_frame(MAC2, MAC1, 16'h0001, e), MAC1, "add nodes");
    n_ctrl_nodes++;
    e = {};
    task_entry(e, 16'd1, 16'd1, 8'd1);   // loopback 1: node 1 -> node 2 -> node 1
    task_entry(e, 16'd2, 16'd1, 8'd3);   // chain:      node 1 -> node 2 -> node 3 -> node 1
    send_expect_ack(ctrl_frame(MAC2, MAC1, 16'h0002, e), MAC1, "add tasks");
    n_ctrl_tasks++;

    // Task 1, 200-byte package (one fragment): back to node 1; check the latency.
    pkg = make_pkg(200, 1);
    send(data_frame(MAC2, MAC1, 16'd1, 200, 0, 1, 200, pkg, 0));
    begin
      int t_last;
      get(r, 200, got);
      t_last = last_beat_cycle;
      check(got && same(r, ack_frame(MAC1, MAC2, data_frame(MAC2, MAC1, 16'd1, 200, 0, 1, 200,
                                                          pkg, 0))), "task 1 ACK");
      n_acks++;
      wait (tx_frames.size() != 0);
      check(tx_first_cycle[0] - t_last == 14 + 25,
            $sformatf("forwarding latency %0d cycles, expected %0d",
                      tx_first_cycle[0] - t_last, 14 + 25));
    end
    recv_pkg(16'd1, pkg, MAC1, 1'b0);

    // Task 2, 4000 bytes in three fragments, out of order with a repeat, to node 3; the
    // testbench disturbs the wait for the first downstream ACK. Input gaps and output
    // back-pressure from here on.
    gaps = 1'b1;
    bp_on = 1'b1;
    pkg = make_pkg(4000, 2);
    order = {2, 0, 0, 1};
    send_pkg(16'd2, pkg, order, MAC1);
    n_multi_frag++; n_out_of_order++; n_duplicate++;
    recv_pkg(16'd2, pkg, MAC3, 1'b1);

    // A package of an unknown task is acknowledged but goes nowhere.
    pkg = make_pkg(64, 3);
    order = {0};
    send_pkg(16'd7, pkg, order, MAC1);
    expect_silence(300, "unknown task");
    n_unknown_task++;

    // A frame for another address is ignored.
    send(data_frame(MAC3, MAC1, 16'd1, 64, 0, 1, 64, pkg, 0));
    expect_silence(100, "frame for another node");
    n_foreign++;

    // A package larger than the input buffer is refused without an ACK.
    begin
      bytes_t big = make_pkg(FRAG, 4);
      int tsz = BUF_BYTES + 8;
      send(data_frame(MAC2, MAC1, 16'd2, FRAG, 0, (tsz + FRAG - 1) / FRAG, tsz, big, 0));
      expect_silence(100, "oversized package");
      n_oversize++;
    end

    // Re-route task 1 to node 3 by overwriting its entry.
    e = {};
    task_entry(e, 16'd1, 16'd1, 8'd3);
    send_expect_ack(ctrl_frame(MAC2, MAC1, 16'h0002, e), MAC1, "overwrite task 1");
    n_ctrl_tasks++;
    pkg = make_pkg(24, 5);
    order = {0};
    send_pkg(16'd1, pkg, order, MAC1);
    recv_pkg(16'd1, pkg, MAC3, 1'b0);
    n_overwrite++;

    // While a package is partly assembled, a fragment of another package from a second sender
    // is refused without an ACK; once the first package has gone, the retry is accepted.
    begin
      bytes_t other;
      pkg = make_pkg(3000, 7);
      other = make_pkg(24, 8);
      order = {1};
      send_pkg(16'd2, pkg, order, MAC1);
      send(data_frame(MAC2, MAC3, 16'd1, 24, 0, 1, 24, other, 0));
      expect_silence(100, "other package while the buffer is held");
      n_buf_held++;
      order = {2, 0};
      send_pkg(16'd2, pkg, order, MAC1);
      recv_pkg(16'd2, pkg, MAC3, 1'b0);
      order = {0};
      send_pkg(16'd1, other, order, MAC3);
      recv_pkg(16'd1, other, MAC3, 1'b0);
    end

    // A package that fills the whole input buffer (12 fragments), in reverse order.
    pkg = make_pkg(BUF_BYTES, 6);
    order = {};
    for (int i = (BUF_BYTES + FRAG - 1) / FRAG - 1; i >= 0; i--) order.push_back(i);
    send_pkg(16'd2, pkg, order, MAC1);
    recv_pkg(16'd2, pkg, MAC3, 1'b0);
    n_full_buffer++; n_multi_frag++; n_out_of_order++;

    repeat (20) @(posedge clk);
    check(state == 4'd0, "node back in the receive state");

    // Every mechanism must have happened.
    check(n_ctrl_nodes > 0, "add-node control frame exercised");
    check(n_ctrl_tasks > 1, "add-task control frames exercised");
    check(n_acks > 0, "acknowledgements exercised");
    check(n_fwd_frames > 0, "forwarding exercised");
    check(n_multi_frag > 0, "multi-fragment package exercised");
    check(n_out_of_order > 0, "out-of-order fragments exercised");
    check(n_duplicate > 0, "repeated fragment exercised");
    check(n_full_buffer > 0, "full input buffer exercised");
    check(n_backpressure > 0, "output back-pressure exercised");
    check(n_wait_stall > 0, "wait for ACK exercised");
    check(n_wrong_ack > 0, "wrong ACK exercised");
    check(n_drop_in_wait > 0, "drop during wait exercised");
    check(n_unknown_task > 0, "unknown task exercised");
    check(n_foreign > 0, "foreign frame exercised");
    check(n_oversize > 0, "oversized package exercised");
    check(n_overwrite > 0, "table overwrite exercised");
    check(n_buf_held > 0, "buffer held for a partly assembled package exercised");
    $display("mechanisms: acks=%0d fwd_frames=%0d backpressure_cycles=%0d", n_acks,
             n_fwd_frames, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
