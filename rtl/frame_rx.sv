// frame_rx: receive side of the stream compute node. It takes one Ethernet frame at a time
// from a 64-bit valid/ready stream, sorts it by EtherType into compute data, control and
// acknowledgement frames, and hands the pieces to the rest of the node.
//
// How it works: the first four beats (32 bytes) are kept in a header register; the fields of
// the compute header, the control header and the acknowledgement copy are read from it. For a
// data frame addressed to this node it pulses hdr_valid once the compute header is complete
// (after beat 3) and then presents each payload word with its index inside the fragment. For a
// control frame it presents each table entry (beats 3 onwards, up to the entry count) together
// with the opcode. Beats past the end of the payload (padding) are consumed and ignored. The
// cycle after the last beat, done pulses; kind, ok, src_mac and echo describe the whole frame
// and stay valid until the next frame starts.
//
// Interface: a new frame is only started while en is high and no done is pending, so the
// controller finishes each frame before the next is read (the design handles one frame
// completely before reading another). When ack_only is high at the start of the frame, data
// and control frames are still read but produce neither payload writes nor table entries.
// Timing: every output is registered, one cycle behind the beat it comes from.
//
// Following the design description: EtherType classification, the compute header fields and
// the control message layout. This design's choices: field widths and offsets (see savi_pkg),
// and that a frame is only taken when its destination MAC equals my_mac.
module frame_rx
  import savi_pkg::*;
#(
  parameter int unsigned FRAG_BYTES = MAX_FRAG_BYTES
) (
  input  logic            clk,
  input  logic            rst_n,
  input  mac_t            my_mac,
  input  logic            en,
  input  logic            ack_only,
  // frame stream in
  input  logic [DW-1:0]   rx_tdata,
  input  logic [BPW-1:0]  rx_tkeep,
  input  logic            rx_tvalid,
  input  logic            rx_tlast,
  output logic            rx_tready,
  // compute header and payload of data frames
  output logic            hdr_valid,
  output comp_hdr_t       chdr,
  output logic            pay_we,
  output logic [15:0]     pay_idx,
  output logic [DW-1:0]   pay_data,
  // entries of control frames
  output logic            ent_we,
  output logic [15:0]     ent_op,
  output logic [DW-1:0]   ent_data,
  // end of frame
  output logic            done,
  output frame_kind_e     kind,
  output logic            ok,
  output mac_t            src_mac,
  output logic [63:0]     echo
);

  localparam int unsigned FRAG_WORDS = (FRAG_BYTES + BPW - 1) / BPW;

  logic [255:0] hdr_q;      // first 32 bytes of the frame
  logic [15:0]  bcnt_q;     // index of the next beat
  logic         in_frame_q;
  logic         ack_only_q;
  logic [15:0]  nbeats_q;   // beats in the last finished frame
  logic         accept;

  // Fields, read from the header register.
  mac_t        dst_f;
  logic [15:0] etype_f;
  frame_kind_e kind_f;
  logic        for_me;
  logic [15:0] ctrl_cnt;
  logic [15:0] pay_words;   // payload words announced by the size field

  assign dst_f   = {byte_at(hdr_q, 0), byte_at(hdr_q, 1), byte_at(hdr_q, 2),
                    byte_at(hdr_q, 3), byte_at(hdr_q, 4), byte_at(hdr_q, 5)};
  assign src_mac = {byte_at(hdr_q, 6), byte_at(hdr_q, 7), byte_at(hdr_q, 8),
                    byte_at(hdr_q, 9), byte_at(hdr_q, 10), byte_at(hdr_q, 11)};
  assign etype_f = be16(hdr_q, 12);
  assign for_me  = (dst_f == my_mac);

  always_comb begin
    unique case (etype_f)
      ETYPE_DATA: kind_f = K_DATA;
      ETYPE_CTRL: kind_f = K_CTRL;
      ETYPE_ACK:  kind_f = K_ACK;
      default:    kind_f = K_OTHER;
    endcase
  end
  assign kind = kind_f;

  assign chdr.task_id     = be16(hdr_q, 14);
  assign chdr.size        = be16(hdr_q, 16);
  assign chdr.frag        = be16(hdr_q, 18);
  assign chdr.total_frags = be16(hdr_q, 20);
  assign chdr.total_size  = {be16(hdr_q, 22), be16(hdr_q, 24)};
  assign chdr.input_id    = be16(hdr_q, 26);
  assign ent_op           = be16(hdr_q, 14);
  assign ctrl_cnt         = be16(hdr_q, 16);
  assign echo             = hdr_q[14*8 +: 64];
  assign pay_words        = 16'((32'(chdr.size) + BPW - 1) / BPW);

  // A frame starts only when the controller allows it and the previous done has been seen.
  assign rx_tready = in_frame_q || (en && !done);
  assign accept    = rx_tvalid && rx_tready;

  // Frame check, evaluated on the finished frame.
  always_comb begin
    ok = 1'b0;
    if (for_me) begin
      unique case (kind_f)
        K_DATA:  ok = (nbeats_q >= 16'(DATA_HDR_BEATS) + pay_words) &&
                      (32'(chdr.size) <= FRAG_BYTES);
        K_CTRL:  ok = (nbeats_q >= 16'd3 + ctrl_cnt) &&
                      (ent_op == OP_ADD_NODES || ent_op == OP_ADD_TASKS);
        K_ACK:   ok = (nbeats_q >= 16'd3);
        default: ok = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_q      <= '0;
      bcnt_q     <= '0;
      in_frame_q <= 1'b0;
      ack_only_q <= 1'b0;
      nbeats_q   <= '0;
      hdr_valid  <= 1'b0;
      pay_we     <= 1'b0;
      pay_idx    <= '0;
      pay_data   <= '0;
      ent_we     <= 1'b0;
      ent_data   <= '0;
      done       <= 1'b0;
    end else begin
      hdr_valid <= 1'b0;
      pay_we    <= 1'b0;
      ent_we    <= 1'b0;
      done      <= 1'b0;
      if (accept) begin
        if (!in_frame_q) begin
          ack_only_q <= ack_only;
          hdr_q      <= {192'd0, rx_tdata};
        end else if (bcnt_q < 16'd4) begin
          hdr_q[64*bcnt_q[1:0] +: 64] <= rx_tdata;
        end
        // Beat 3 completes the compute header of a data frame.
        if (bcnt_q == 16'd3 && for_me && kind_f == K_DATA && !ack_only_q)
          hdr_valid <= 1'b1;
        // Payload words of a data frame (header register holds beats 0..3 by now).
        if (bcnt_q >= 16'(DATA_HDR_BEATS) && for_me && kind_f == K_DATA && !ack_only_q &&
            (bcnt_q - 16'(DATA_HDR_BEATS)) < pay_words &&
            (bcnt_q - 16'(DATA_HDR_BEATS)) < 16'(FRAG_WORDS)) begin
          pay_we   <= 1'b1;
          pay_idx  <= bcnt_q - 16'(DATA_HDR_BEATS);
          pay_data <= rx_tdata;
        end
        // Table entries of a control frame.
        if (bcnt_q >= 16'd3 && for_me && kind_f == K_CTRL && !ack_only_q &&
            (bcnt_q - 16'd3) < ctrl_cnt &&
            (ent_op == OP_ADD_NODES || ent_op == OP_ADD_TASKS)) begin
          ent_we   <= 1'b1;
          ent_data <= rx_tdata;
        end
        if (bcnt_q != 16'hFFFF) bcnt_q <= bcnt_q + 16'd1;
        if (rx_tlast) begin
          in_frame_q <= 1'b0;
          bcnt_q     <= '0;
          nbeats_q   <= (bcnt_q == 16'hFFFF) ? bcnt_q : bcnt_q + 16'd1;
          done       <= 1'b1;
        end else begin
          in_frame_q <= 1'b1;
        end
      end
    end
  end

  // rx_tkeep is not needed: lengths come from the size and count fields.
  logic unused_keep;
  assign unused_keep = ^rx_tkeep;

endmodule
