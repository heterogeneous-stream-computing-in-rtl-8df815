// frame_tx: builds and sends the node's outgoing frames on a 64-bit valid/ready stream: either
// an acknowledgement or a compute data frame whose payload comes from the output buffer.
//
// An acknowledgement is 22 bytes (3 beats): destination, own source MAC, the ACK EtherType and
// the 8-byte copy of the acknowledged frame's first header bytes (echo). A data frame is the
// 32-byte header (4 beats: MACs, data EtherType, the compute header chdr, 4 reserved bytes)
// followed by ceil(chdr.size/8) payload words read from the output buffer from word pay_base
// on. The Ethernet MAC beyond this stream pads short frames to the minimum length.
//
// The payload is fetched ahead into a two-entry queue while the header beats go out, so with
// tx_tready held high a frame leaves at one beat per cycle with no gaps. tx_tkeep marks the
// valid bytes of the last beat.
//
// Interface and timing: start (one cycle, while not busy) latches every input; the first beat
// is offered on the next cycle; done pulses the cycle after the last beat is accepted.
//
// Following the design description: every frame is acknowledged, and processed packages are
// forwarded as Ethernet frames to the address from the node table. This design's choices: the
// frame formats (see savi_pkg) and the prefetch queue.
module frame_tx
  import savi_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 2048,
  localparam int unsigned AW       = $clog2(BUF_WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  mac_t           my_mac,
  input  logic           start,
  input  logic           is_ack,
  input  mac_t           dst_mac,
  input  logic [63:0]    echo,
  input  comp_hdr_t      chdr,
  input  logic [AW-1:0]  pay_base,
  // output buffer read port
  output logic [AW-1:0]  rd_addr,
  input  logic [DW-1:0]  rd_data,
  // frame stream out
  output logic [DW-1:0]  tx_tdata,
  output logic [BPW-1:0] tx_tkeep,
  output logic           tx_tvalid,
  output logic           tx_tlast,
  input  logic           tx_tready,
  output logic           busy,
  output logic           done
);

  logic [255:0] hdr_q;       // header bytes, byte 0 in bits [7:0]
  logic [15:0]  hbeats_q;    // header beats
  logic [15:0]  nbeats_q;    // all beats
  logic [BPW-1:0] lastkeep_q;
  logic [15:0]  beat_q;      // index of the beat on offer
  logic [15:0]  pwords_q;    // payload words
  logic [15:0]  issued_q;    // payload reads issued
  logic [AW-1:0] raddr_q;
  logic         pend_q;      // a read issued last cycle
  logic         active_q;

  // Two-entry payload queue.
  logic [DW-1:0] q_data [2];
  logic          q_wp, q_rp;
  logic [1:0]    q_cnt;
  logic          q_push, q_pop, issue;

  logic [255:0] hdr_d;
  logic [15:0]  pw_d;
  logic [2:0]   rem_d;

  function automatic logic [255:0] put8(input logic [255:0] v, input int unsigned i,
                                        input logic [7:0] b);
    logic [255:0] r;
    r = v;
    r[8*i +: 8] = b;
    return r;
  endfunction

  // Header assembly for the frame being started.
  always_comb begin
    hdr_d = '0;
    for (int unsigned i = 0; i < 6; i++) begin
      hdr_d = put8(hdr_d, i,     dst_mac[8*(5-i) +: 8]);
      hdr_d = put8(hdr_d, 6 + i, my_mac[8*(5-i) +: 8]);
    end
    if (is_ack) begin
      hdr_d = put8(hdr_d, 12, ETYPE_ACK[15:8]);
      hdr_d = put8(hdr_d, 13, ETYPE_ACK[7:0]);
      hdr_d[14*8 +: 64] = echo;
    end else begin
      hdr_d = put8(hdr_d, 12, ETYPE_DATA[15:8]);
      hdr_d = put8(hdr_d, 13, ETYPE_DATA[7:0]);
      hdr_d = put8(hdr_d, 14, chdr.task_id[15:8]);
      hdr_d = put8(hdr_d, 15, chdr.task_id[7:0]);
      hdr_d = put8(hdr_d, 16, chdr.size[15:8]);
      hdr_d = put8(hdr_d, 17, chdr.size[7:0]);
      hdr_d = put8(hdr_d, 18, chdr.frag[15:8]);
      hdr_d = put8(hdr_d, 19, chdr.frag[7:0]);
      hdr_d = put8(hdr_d, 20, chdr.total_frags[15:8]);
      hdr_d = put8(hdr_d, 21, chdr.total_frags[7:0]);
      hdr_d = put8(hdr_d, 22, chdr.total_size[31:24]);
      hdr_d = put8(hdr_d, 23, chdr.total_size[23:16]);
      hdr_d = put8(hdr_d, 24, chdr.total_size[15:8]);
      hdr_d = put8(hdr_d, 25, chdr.total_size[7:0]);
      hdr_d = put8(hdr_d, 26, chdr.input_id[15:8]);
      hdr_d = put8(hdr_d, 27, chdr.input_id[7:0]);
    end
    pw_d  = is_ack ? 16'd0 : 16'((32'(chdr.size) + BPW - 1) / BPW);
    rem_d = is_ack ? 3'(ACK_BYTES % BPW) : chdr.size[2:0];
  end

  assign busy = active_q;

  // Output beat.
  logic is_pay;
  assign is_pay    = (beat_q >= hbeats_q);
  assign tx_tvalid = active_q && (!is_pay || q_cnt != 2'd0);
  assign tx_tdata  = is_pay ? q_data[q_rp] : hdr_q[64*beat_q[1:0] +: 64];
  assign tx_tlast  = (beat_q + 16'd1 == nbeats_q);
  assign tx_tkeep  = tx_tlast ? lastkeep_q : '1;

  assign q_pop   = tx_tvalid && tx_tready && is_pay;
  assign q_push  = pend_q;
  assign issue   = active_q && (issued_q < pwords_q) &&
                   (32'(q_cnt) + 32'(pend_q) - 32'(q_pop) < 32'd2);
  assign rd_addr = raddr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_q      <= '0;
      hbeats_q   <= '0;
      nbeats_q   <= '0;
      lastkeep_q <= '0;
      beat_q     <= '0;
      pwords_q   <= '0;
      issued_q   <= '0;
      raddr_q    <= '0;
      pend_q     <= 1'b0;
      active_q   <= 1'b0;
      q_wp       <= 1'b0;
      q_rp       <= 1'b0;
      q_cnt      <= '0;
      done       <= 1'b0;
      q_data[0]  <= '0;
      q_data[1]  <= '0;
    end else begin
      done   <= 1'b0;
      pend_q <= 1'b0;
      if (start && !active_q) begin
        hdr_q      <= hdr_d;
        hbeats_q   <= is_ack ? 16'((ACK_BYTES + BPW - 1) / BPW) : 16'(DATA_HDR_BEATS);
        nbeats_q   <= (is_ack ? 16'((ACK_BYTES + BPW - 1) / BPW) : 16'(DATA_HDR_BEATS)) + pw_d;
        lastkeep_q <= (rem_d == 3'd0 || pw_d == 16'd0 && !is_ack) ? '1
                                                                  : BPW'((1 << rem_d) - 1);
        beat_q     <= '0;
        pwords_q   <= pw_d;
        issued_q   <= '0;
        raddr_q    <= pay_base;
        active_q   <= 1'b1;
        q_wp       <= 1'b0;
        q_rp       <= 1'b0;
        q_cnt      <= '0;
      end else if (active_q) begin
        if (issue) begin
          pend_q   <= 1'b1;
          issued_q <= issued_q + 16'd1;
          raddr_q  <= raddr_q + 1'b1;
        end
        if (q_push) begin
          q_data[q_wp] <= rd_data;
          q_wp         <= ~q_wp;
        end
        if (q_pop) q_rp <= ~q_rp;
        q_cnt <= q_cnt + {1'b0, q_push} - {1'b0, q_pop};
        if (tx_tvalid && tx_tready) begin
          beat_q <= beat_q + 16'd1;
          if (tx_tlast) begin
            active_q <= 1'b0;
            done     <= 1'b1;
          end
        end
      end
    end
  end

endmodule
