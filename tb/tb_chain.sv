// tb_chain: the three-node chain test run with FPGA nodes. Two compute nodes (node 2 and
// node 3) and the testbench as node 1, the user/control machine, are joined by
// a behavioural Ethernet switch that delivers each frame to the node owning its destination
// address. Node 1 programs both nodes with the configuration of the chain test (node table of
// three Ethernet addresses; node 2: task 1 -> node 1, task 2 -> node 3; node 3: task 2 ->
// node 1, task 3 -> node 1), then for each route
//     loopback 1: node 1 -> node 2 -> node 1      (task 1)
//     chain:      node 1 -> node 2 -> node 3 -> node 1  (task 2)
//     loopback 2: node 1 -> node 3 -> node 1      (task 3)
// sends packages (stop-and-wait per fragment), collects the returned package, acknowledges
// each returned fragment and checks that it equals what was sent (the nodes' procedure is the
// identity). 200-byte packages are sent 500 times per route, as in the test configuration.
// Then package sizes from 8 bytes to 64 KB are sent twice each. The original system was
// measured up to about 50 KB, so the nodes here get 8192-word (64 KB) buffers instead of the
// default 2048 words; all other parameters are at their defaults. Buffer size does not change
// the timing, and the node at its default sizes is tested by tb_savi_fpga_node. The round-trip time
// in cycles is printed per route and size, and the chain must take longer than either
// loopback and no slower than the two loopbacks together. Both loopbacks must take the same time.
module tb_chain;
  import tb_pkg::*;

  localparam logic [47:0] MAC1 = 48'hfa163e2076e6;
  localparam logic [47:0] MAC2 = 48'hfa163e4d5a60;
  localparam logic [47:0] MAC3 = 48'hfa163e152650;
  localparam int FRAG = 1480;
  localparam int BUF_WORDS = 8192;  // 64 KB per package buffer, to hold the whole sweep

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0d: %s", cycle, w); end
  endtask

  // ---------------- two nodes ----------------
  logic [63:0] rxd [2], txd [2];
  logic [7:0]  rxk [2], txk [2];
  logic        rxv [2], rxl [2], rxr [2], txv [2], txl [2];
  logic [3:0]  st  [2];
  localparam logic [47:0] NODE_MAC [2] = '{MAC2, MAC3};

  for (genvar n = 0; n < 2; n++) begin : g_node
    savi_fpga_node #(.BUF_WORDS(BUF_WORDS)) u (
      .clk, .rst_n, .my_mac(NODE_MAC[n]),
      .rx_tdata(rxd[n]), .rx_tkeep(rxk[n]), .rx_tvalid(rxv[n]), .rx_tlast(rxl[n]),
      .rx_tready(rxr[n]),
      .tx_tdata(txd[n]), .tx_tkeep(txk[n]), .tx_tvalid(txv[n]), .tx_tlast(txl[n]),
      .tx_tready(1'b1), .state(st[n])
    );
  end

  // ---------------- switch ----------------
  bytes_t inbox [3][$];          // frames waiting for node 1 (index 0), node 2, node 3
  bytes_t cur [2];

  function automatic int port_of(input bytes_t f);
    logic [47:0] d = {f[0], f[1], f[2], f[3], f[4], f[5]};
    if (d == MAC1) return 0;
    if (d == MAC2) return 1;
    if (d == MAC3) return 2;
    return -1;
  endfunction

  always @(posedge clk) begin
    for (int n = 0; n < 2; n++) if (!rst_n) cur[n] = {};
    else if (txv[n]) begin
      for (int i = 0; i < 8; i++) if (txk[n][i]) cur[n].push_back(txd[n][8*i +: 8]);
      if (txl[n]) begin
        int p;
        p = port_of(cur[n]);
        if (p >= 0) inbox[p].push_back(cur[n]);
        cur[n] = {};
      end
    end
  end

  // Deliver queued frames into each node's receive stream.
  for (genvar n = 0; n < 2; n++) begin : g_drv
    initial begin
      rxv[n] = 1'b0; rxl[n] = 1'b0; rxd[n] = '0; rxk[n] = '0;
      forever begin
        @(negedge clk);
        if (inbox[n + 1].size() != 0) begin
          bytes_t f;
          beats_t b;
          f = inbox[n + 1].pop_front();
          b = to_beats(f);
          for (int i = 0; i < b.size(); i++) begin
            rxd[n] = b[i]; rxk[n] = 8'hFF; rxl[n] = (i == b.size() - 1); rxv[n] = 1'b1;
            @(posedge clk);
            while (!rxr[n]) @(posedge clk);
            @(negedge clk);
          end
          rxv[n] = 1'b0;
        end
      end
    end
  end

  // ---------------- node 1 ----------------
  bytes_t acks_in[$];            // ACKs received by node 1
  bytes_t result;                // returned package being assembled
  int     frags_back;
  int     ret_total;

  // Node 1's receive side: keep ACKs, acknowledge and store returned data fragments.
  initial forever begin
    @(negedge clk);
    while (inbox[0].size() != 0) begin
      bytes_t f;
      logic [47:0] src;
      f = inbox[0].pop_front();
      src = {f[6], f[7], f[8], f[9], f[10], f[11]};
      if (f[12] == 8'h88 && f[13] == 8'hB7) acks_in.push_back(f);
      else if (f[12] == 8'h88 && f[13] == 8'hB5) begin
        int sz, fr;
        sz = {f[16], f[17]};
        fr = {f[18], f[19]};
        ret_total = {f[22], f[23], f[24], f[25]};
        if (result.size() < ret_total) for (int i = result.size(); i < ret_total; i++)
          result.push_back(8'h00);
        for (int i = 0; i < sz; i++) result[fr * FRAG + i] = f[32 + i];
        frags_back++;
        inbox[(src == MAC2) ? 1 : 2].push_back(ack_frame(src, MAC1, f));
      end
    end
  end

  // Send a frame from node 1 to node 'to' (1 = node 2, 2 = node 3) and wait for its ACK.
  task automatic send_wait_ack(input int to, input bytes_t f, input string what);
    int t0 = cycle;
    inbox[to].push_back(f);
    while (acks_in.size() == 0 && cycle - t0 < 100000) @(negedge clk);
    check(acks_in.size() != 0, {what, ": ACK"});
    if (acks_in.size() != 0) begin
      bytes_t a = acks_in.pop_front();
      bit ok = 1'b1;
      for (int i = 14; i < 22; i++) if (a[i] !== f[i]) ok = 1'b0;
      if (!ok) check(1'b0, {what, ": ACK echo"});
    end
  endtask

  // One round trip of a package; returns the cycles from first send to full return.
  task automatic round_trip(input int to, input logic [15:0] tid, input int size,
                            input int seed, output int cycles);
    bytes_t pkg = make_pkg(size, seed);
    int tf = (size + FRAG - 1) / FRAG;
    int t0 = cycle;
    logic [47:0] dst = (to == 1) ? MAC2 : MAC3;
    bit same;
    result = {}; frags_back = 0; ret_total = 0;
    for (int fr = 0; fr < tf; fr++) begin
      int sz = (fr == tf - 1) ? size - fr * FRAG : FRAG;
      send_wait_ack(to, data_frame(dst, MAC1, tid, sz, fr, tf, size, pkg, fr * FRAG),
                    $sformatf("task %0d size %0d fragment %0d", tid, size, fr));
    end
    while (frags_back < tf && cycle - t0 < 200000) @(negedge clk);
    cycles = cycle - t0;
    check(frags_back == tf, $sformatf("task %0d size %0d: %0d of %0d fragments back", tid,
                                      size, frags_back, tf));
    same = (result.size() == size);
    if (same) foreach (pkg[i]) if (result[i] !== pkg[i]) same = 1'b0;
    check(same, $sformatf("task %0d size %0d: package returned unchanged", tid, size));
    // let the last ACK reach the node before the next package
    repeat (20) @(negedge clk);
  endtask

  task automatic configure(input int to, input logic [47:0] mac, input bytes_t tasks);
    bytes_t e;
    node_entry(e, 8'd1, 8'd1, MAC1);
    node_entry(e, 8'd2, 8'd1, MAC2);
    node_entry(e, 8'd3, 8'd1, MAC3);
    send_wait_ack(to, ctrl_frame(mac, MAC1, 16'h0001, e), "add nodes");
    send_wait_ack(to, ctrl_frame(mac, MAC1, 16'h0002, tasks), "add tasks");
  endtask

  int sizes[$] = '{8, 200, 1000, 1480, 2000, 5000, 10000, 16384, 30000, 50000, 65536};
  int lat [3][$];

  initial begin
    bytes_t t;
    int c;
    string names[3] = '{"loopback 1", "chain", "loopback 2"};
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    t = {};
    task_entry(t, 16'd1, 16'd1, 8'd1);
    task_entry(t, 16'd2, 16'd1, 8'd3);
    configure(1, MAC2, t);
    t = {};
    task_entry(t, 16'd2, 16'd1, 8'd1);
    task_entry(t, 16'd3, 16'd1, 8'd1);
    configure(2, MAC3, t);

    // 500 iterations of the 200-byte package on each route.
    for (int r = 0; r < 3; r++) begin
      int sum;
      sum = 0;
      for (int it = 0; it < 500; it++) begin
        round_trip((r == 2) ? 2 : 1, 16'(r + 1), 200, it, c);
        sum += c;
      end
      $display("%s: 200-byte package, 500 iterations, mean round trip %0d cycles", names[r],
               sum / 500);
    end
    // Size sweep, two iterations each.
    foreach (sizes[k]) begin
      for (int r = 0; r < 3; r++) begin
        int sum;
        sum = 0;
        for (int it = 0; it < 2; it++) begin
          round_trip((r == 2) ? 2 : 1, 16'(r + 1), sizes[k], k * 10 + it, c);
          sum += c;
        end
        lat[r].push_back(sum / 2);
      end
      $display("size %5d: loopback 1 %6d, chain %6d, loopback 2 %6d cycles", sizes[k],
               lat[0][k], lat[1][k], lat[2][k]);
      check(lat[1][k] > lat[0][k] && lat[1][k] > lat[2][k],
            $sformatf("size %0d: chain slower than a loopback", sizes[k]));
      check(lat[1][k] <= lat[0][k] + lat[2][k],
            $sformatf("size %0d: chain no slower than both loopbacks together", sizes[k]));
      check(lat[0][k] == lat[2][k], $sformatf("size %0d: both loopbacks equal", sizes[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
