// savi_fpga_node: an FPGA compute node for stream computing over raw Ethernet.
//
// A supervisor programs the node with two tables through control frames: the task table (task
// ID -> procedure, destination node) and the node table (node ID -> address). Compute data
// arrives as fragments of a package; the node acknowledges every frame, reassembles the
// package in its input buffer, looks up the package's task, applies the procedure, and sends
// the result from its output buffer to the destination's address, one fragment per frame,
// waiting for each fragment's acknowledgement. One controller runs all of this in sequence:
// a frame is handled completely before the next one is read.
//
// Ports: my_mac is the node's own Ethernet address. rx_* and tx_* are 64-bit valid/ready frame
// streams (one frame from first beat to tlast, byte 0 of the frame in bits [7:0]) towards the
// Ethernet MAC, which is not part of this design. state is the controller state, for
// observation only.
//
// Parameters: BUF_WORDS sizes each of the two package buffers in 8-byte words; FRAG_BYTES is
// the payload of one data frame; TASK_ENTRIES and NODE_ENTRIES size the tables. All four are
// this design's choices: the design description only says that the buffers and tables are
// kept small on the FPGA.
module savi_fpga_node
  import savi_pkg::*;
#(
  parameter int unsigned BUF_WORDS    = 2048,
  parameter int unsigned FRAG_BYTES   = MAX_FRAG_BYTES,
  parameter int unsigned TASK_ENTRIES = 8,
  parameter int unsigned NODE_ENTRIES = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  mac_t           my_mac,
  input  logic [DW-1:0]  rx_tdata,
  input  logic [BPW-1:0] rx_tkeep,
  input  logic           rx_tvalid,
  input  logic           rx_tlast,
  output logic           rx_tready,
  output logic [DW-1:0]  tx_tdata,
  output logic [BPW-1:0] tx_tkeep,
  output logic           tx_tvalid,
  output logic           tx_tlast,
  input  logic           tx_tready,
  output logic [3:0]     state
);

  localparam int unsigned AW = $clog2(BUF_WORDS);

  // receiver
  logic        rx_en, rx_ack_only, hdr_valid, pay_we, ent_we, rx_done, rx_ok;
  comp_hdr_t   rx_chdr;
  logic [15:0] pay_idx, ent_op;
  logic [DW-1:0] pay_data, ent_data;
  frame_kind_e rx_kind;
  mac_t        rx_src;
  logic [63:0] rx_echo;
  // input buffer
  logic        ib_frag_ok, ib_complete, ib_commit, ib_clear;
  task_id_t    ib_task;
  logic [31:0] ib_size;
  logic [AW-1:0] ib_rd_addr;
  logic [DW-1:0] ib_rd_data;
  // tables
  logic        tt_lk_req, tt_hit, tt_full, nt_lk_req, nt_hit, nt_full;
  task_id_t    tt_lk_key;
  proc_id_t    tt_proc;
  node_id_t    tt_dest, nt_lk_key;
  logic [7:0]  nt_type;
  mac_t        nt_addr;
  // compute and output
  logic        ce_start, ce_done, ce_busy, ob_we, ob_load, ob_advance, ob_last;
  logic [AW:0] ce_nwords;
  proc_id_t    ce_proc;
  logic [AW-1:0] ob_waddr, ob_rd_addr, ob_base;
  logic [DW-1:0] ob_wdata, ob_rd_data;
  logic [31:0] ob_size;
  logic [15:0] ob_frag, ob_bytes, ob_nfrags;
  // transmitter
  logic        tx_start, tx_is_ack, tx_done, tx_busy;
  mac_t        tx_dst;
  logic [63:0] tx_echo;
  comp_hdr_t   tx_chdr;

  frame_rx #(.FRAG_BYTES(FRAG_BYTES)) u_rx (
    .clk, .rst_n, .my_mac, .en(rx_en), .ack_only(rx_ack_only),
    .rx_tdata, .rx_tkeep, .rx_tvalid, .rx_tlast, .rx_tready,
    .hdr_valid, .chdr(rx_chdr), .pay_we, .pay_idx, .pay_data,
    .ent_we, .ent_op, .ent_data,
    .done(rx_done), .kind(rx_kind), .ok(rx_ok), .src_mac(rx_src), .echo(rx_echo)
  );

  input_buffer #(.BUF_WORDS(BUF_WORDS), .FRAG_BYTES(FRAG_BYTES)) u_ibuf (
    .clk, .rst_n, .hdr_valid, .chdr(rx_chdr), .pay_we, .pay_idx, .pay_data,
    .commit(ib_commit), .clear(ib_clear), .frag_ok(ib_frag_ok), .complete(ib_complete),
    .pkg_task(ib_task), .pkg_size(ib_size), .rd_addr(ib_rd_addr), .rd_data(ib_rd_data)
  );

  task_table #(.ENTRIES(TASK_ENTRIES)) u_tasks (
    .clk, .rst_n, .we(ent_we && ent_op == OP_ADD_TASKS),
    .wentry(decode_task_entry(ent_data)),
    .lk_req(tt_lk_req), .lk_key(tt_lk_key), .lk_hit(tt_hit), .lk_proc(tt_proc),
    .lk_dest(tt_dest), .full(tt_full)
  );

  node_table #(.ENTRIES(NODE_ENTRIES)) u_nodes (
    .clk, .rst_n, .we(ent_we && ent_op == OP_ADD_NODES),
    .wentry(decode_node_entry(ent_data)),
    .lk_req(nt_lk_req), .lk_key(nt_lk_key), .lk_hit(nt_hit), .lk_type(nt_type),
    .lk_addr(nt_addr), .full(nt_full)
  );

  compute_engine #(.BUF_WORDS(BUF_WORDS)) u_ce (
    .clk, .rst_n, .start(ce_start), .nwords(ce_nwords), .proc_id(ce_proc),
    .in_rd_addr(ib_rd_addr), .in_rd_data(ib_rd_data),
    .out_we(ob_we), .out_waddr(ob_waddr), .out_wdata(ob_wdata),
    .busy(ce_busy), .done(ce_done)
  );

  output_buffer #(.BUF_WORDS(BUF_WORDS), .FRAG_BYTES(FRAG_BYTES)) u_obuf (
    .clk, .rst_n, .we(ob_we), .waddr(ob_waddr), .wdata(ob_wdata),
    .rd_addr(ob_rd_addr), .rd_data(ob_rd_data),
    .load(ob_load), .pkg_size(ob_size), .advance(ob_advance),
    .cur_frag(ob_frag), .cur_bytes(ob_bytes), .cur_base(ob_base), .nfrags(ob_nfrags),
    .last_frag(ob_last)
  );

  frame_tx #(.BUF_WORDS(BUF_WORDS)) u_tx (
    .clk, .rst_n, .my_mac, .start(tx_start), .is_ack(tx_is_ack), .dst_mac(tx_dst),
    .echo(tx_echo), .chdr(tx_chdr), .pay_base(ob_base),
    .rd_addr(ob_rd_addr), .rd_data(ob_rd_data),
    .tx_tdata, .tx_tkeep, .tx_tvalid, .tx_tlast, .tx_tready,
    .busy(tx_busy), .done(tx_done)
  );

  node_ctrl #(.BUF_WORDS(BUF_WORDS)) u_ctrl (
    .clk, .rst_n,
    .rx_en, .rx_ack_only, .rx_done, .rx_kind, .rx_ok, .rx_src, .rx_echo,
    .ib_frag_ok, .ib_complete, .ib_task, .ib_size, .ib_commit, .ib_clear,
    .tt_lk_req, .tt_lk_key, .tt_hit, .tt_proc, .tt_dest,
    .nt_lk_req, .nt_lk_key, .nt_hit, .nt_type, .nt_addr,
    .ce_start, .ce_nwords, .ce_proc, .ce_done,
    .ob_load, .ob_size, .ob_advance, .ob_frag, .ob_bytes, .ob_nfrags, .ob_last,
    .tx_start, .tx_is_ack, .tx_dst, .tx_echo, .tx_chdr, .tx_done,
    .state_o(state)
  );

  // Table-full flags and busy flags are not needed by the controller.
  logic unused;
  assign unused = tt_full ^ nt_full ^ ce_busy ^ tx_busy;

endmodule
