// node_ctrl: the single sequential controller of the FPGA compute node. It reads one frame,
// acknowledges it, and for a complete package looks up the task, runs the procedure and
// forwards the result fragment by fragment, waiting for the next node's acknowledgement after
// each fragment, before it reads another frame.
//
// States, in the order of the design's flow chart:
//   RX       (packet in) the receiver may take a frame. Table entries of a control frame are
//            written while it arrives (the update-tables step). A data frame whose fragment the
//            input buffer accepts is committed. A good data or control frame leads to ACK; any
//            other frame (bad, not for this node, an unexpected ACK) is dropped.
//   ACK      (send ACK) start the acknowledgement to the frame's sender; ACK_W waits for it.
//            Then: package complete -> LK_TASK, otherwise back to RX.
//   LK_TASK  look up the package's task ID; LK_NODE looks up the destination node; LK_CHK
//            checks both. An unknown task or node, or a non-Ethernet address, drops the package.
//   COMP     (perform compute) start the compute engine; COMP_W waits, then frees the input
//            buffer and loads the output buffer's fragment sequence.
//   FWD      (forward packet) start the data frame of the current fragment; FWD_W waits.
//   WAIT_ACK the receiver takes frames again, ACKs only. An ACK from the destination that
//            echoes this fragment's task ID and fragment number moves on to the next fragment
//            (FWD) or, after the last, back to RX. Data and control frames read meanwhile are
//            dropped without an acknowledgement, which holds their senders back (flow control
//            by withholding ACKs). Other ACKs are ignored. There is no timeout.
//
// Following the design description: the states and their order, acknowledging every frame,
// withholding acknowledgements as flow control, task-table then node-table lookup. This
// design's choices: dropping packages with no table entry, matching ACKs by task ID and
// fragment number, and the exact state split.
module node_ctrl
  import savi_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 2048,
  localparam int unsigned AW       = $clog2(BUF_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // receiver
  output logic          rx_en,
  output logic          rx_ack_only,
  input  logic          rx_done,
  input  frame_kind_e   rx_kind,
  input  logic          rx_ok,
  input  mac_t          rx_src,
  input  logic [63:0]   rx_echo,
  // input buffer
  input  logic          ib_frag_ok,
  input  logic          ib_complete,
  input  task_id_t      ib_task,
  input  logic [31:0]   ib_size,
  output logic          ib_commit,
  output logic          ib_clear,
  // tables
  output logic          tt_lk_req,
  output task_id_t      tt_lk_key,
  input  logic          tt_hit,
  input  proc_id_t      tt_proc,
  input  node_id_t      tt_dest,
  output logic          nt_lk_req,
  output node_id_t      nt_lk_key,
  input  logic          nt_hit,
  input  logic [7:0]    nt_type,
  input  mac_t          nt_addr,
  // compute engine
  output logic          ce_start,
  output logic [AW:0]   ce_nwords,
  output proc_id_t      ce_proc,
  input  logic          ce_done,
  // output buffer
  output logic          ob_load,
  output logic [31:0]   ob_size,
  output logic          ob_advance,
  input  logic [15:0]   ob_frag,
  input  logic [15:0]   ob_bytes,
  input  logic [15:0]   ob_nfrags,
  input  logic          ob_last,
  // transmitter
  output logic          tx_start,
  output logic          tx_is_ack,
  output mac_t          tx_dst,
  output logic [63:0]   tx_echo,
  output comp_hdr_t     tx_chdr,
  input  logic          tx_done,
  // state, for observation
  output logic [3:0]    state_o
);

  typedef enum logic [3:0] {
    S_RX, S_ACK, S_ACK_W, S_LK_TASK, S_LK_NODE, S_LK_CHK,
    S_COMP, S_COMP_W, S_FWD, S_FWD_W, S_WAIT_ACK
  } state_e;

  state_e   st_q, st_d;
  mac_t     ack_dst_q;      // sender of the frame being acknowledged
  logic [63:0] ack_echo_q;
  mac_t     fwd_dst_q;      // next node's address
  proc_id_t proc_q;
  task_id_t fwd_task_q;
  logic [31:0] fwd_size_q;

  logic rx_good_data, rx_good_ctrl, ack_match;
  assign rx_good_data = rx_done && rx_ok && rx_kind == K_DATA && ib_frag_ok;
  assign rx_good_ctrl = rx_done && rx_ok && rx_kind == K_CTRL;
  assign ack_match    = rx_done && rx_ok && rx_kind == K_ACK && rx_src == fwd_dst_q &&
                        rx_echo[15:0] == {fwd_task_q[7:0], fwd_task_q[15:8]} &&
                        rx_echo[47:32] == {ob_frag[7:0], ob_frag[15:8]};

  always_comb begin
    st_d = st_q;
    unique case (st_q)
      S_RX:       if (rx_good_data || rx_good_ctrl) st_d = S_ACK;
      S_ACK:      st_d = S_ACK_W;
      S_ACK_W:    if (tx_done) st_d = ib_complete ? S_LK_TASK : S_RX;
      S_LK_TASK:  st_d = S_LK_NODE;
      S_LK_NODE:  st_d = tt_hit ? S_LK_CHK : S_RX;
      S_LK_CHK:   st_d = (nt_hit && nt_type == ADDR_TYPE_ETH) ? S_COMP : S_RX;
      S_COMP:     st_d = S_COMP_W;
      S_COMP_W:   if (ce_done) st_d = S_FWD;
      S_FWD:      st_d = S_FWD_W;
      S_FWD_W:    if (tx_done) st_d = S_WAIT_ACK;
      S_WAIT_ACK: if (ack_match) st_d = ob_last ? S_RX : S_FWD;
      default:    st_d = S_RX;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= S_RX;
      ack_dst_q  <= '0;
      ack_echo_q <= '0;
      fwd_dst_q  <= '0;
      proc_q     <= '0;
      fwd_task_q <= '0;
      fwd_size_q <= '0;
    end else begin
      st_q <= st_d;
      if (st_q == S_RX && rx_done) begin
        ack_dst_q  <= rx_src;
        ack_echo_q <= rx_echo;
      end
      if (st_q == S_LK_NODE) proc_q <= tt_proc;
      if (st_q == S_LK_CHK) begin
        fwd_dst_q  <= nt_addr;
        fwd_task_q <= ib_task;
        fwd_size_q <= ib_size;
      end
    end
  end

  assign state_o     = st_q;
  assign rx_en       = (st_q == S_RX) || (st_q == S_WAIT_ACK);
  assign rx_ack_only = (st_q == S_WAIT_ACK);
  assign ib_commit   = (st_q == S_RX) && rx_good_data;
  // The package is dropped after a failed lookup and freed once it has been computed.
  assign ib_clear    = (st_q == S_LK_NODE && !tt_hit) ||
                       (st_q == S_LK_CHK && !(nt_hit && nt_type == ADDR_TYPE_ETH)) ||
                       (st_q == S_COMP_W && ce_done);
  assign tt_lk_req   = (st_q == S_LK_TASK);
  assign tt_lk_key   = ib_task;
  assign nt_lk_req   = (st_q == S_LK_NODE);
  assign nt_lk_key   = tt_dest;
  assign ce_start    = (st_q == S_COMP);
  assign ce_nwords   = (AW+1)'((fwd_size_q + BPW - 1) / BPW);
  assign ce_proc     = proc_q;
  assign ob_load     = (st_q == S_COMP_W) && ce_done;
  assign ob_size     = fwd_size_q;
  assign ob_advance  = (st_q == S_WAIT_ACK) && ack_match && !ob_last;
  assign tx_start    = (st_q == S_ACK) || (st_q == S_FWD);
  assign tx_is_ack   = (st_q == S_ACK);
  assign tx_dst      = (st_q == S_ACK) ? ack_dst_q : fwd_dst_q;
  assign tx_echo     = ack_echo_q;

  always_comb begin
    tx_chdr.task_id     = fwd_task_q;
    tx_chdr.size        = ob_bytes;
    tx_chdr.frag        = ob_frag;
    tx_chdr.total_frags = ob_nfrags;
    tx_chdr.total_size  = fwd_size_q;
    tx_chdr.input_id    = '0;
  end

endmodule
