// input_buffer: reassembles a compute package from its fragments.
//
// A package is larger than one Ethernet frame, so the sender cuts it into fragments that may
// arrive in any order. Each fragment carries its number, the number of fragments and the
// package size; fragment n holds bytes n*FRAG_BYTES onwards, so its payload is written at word
// n*FRAG_WORDS of the buffer memory. A bitmap records which fragments have been committed; the
// package is complete when every bit up to the fragment count is set.
//
// Interface and timing: hdr_valid presents the compute header of the frame being received. The
// header is checked at once and the verdict is held in frag_ok until the next header: the
// package must fit the buffer, the fragment count must match the size, the fragment number must
// be in range and the fragment size must be the one its place implies. Once one fragment of a
// package has been committed, the buffer belongs to that package until clear: a fragment of any
// other package (another task ID or size) is refused, so it goes unacknowledged and its sender
// must try again later. While nothing has been committed, a good fragment of another package
// starts that package instead. Payload words (pay_we) are written only while frag_ok is high. commit marks the
// fragment as received once the whole frame has been checked; a repeated fragment is written
// again and changes nothing else. clear empties the buffer after the package has been used. The
// memory has one write port and a read port with one cycle of latency (rd_addr to rd_data).
//
// Following the design description: fragment number, total fragments and total size are used to
// piece out-of-order frames together into one input buffer, and a node holds senders back by not
// acknowledging their frames until its buffer has room. This design's choices: the fixed
// fragment stride, the consistency checks, the bitmap, and a buffer that holds one package.
module input_buffer
  import savi_pkg::*;
#(
  parameter int unsigned BUF_WORDS  = 2048,
  parameter int unsigned FRAG_BYTES = MAX_FRAG_BYTES,
  localparam int unsigned AW        = $clog2(BUF_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            hdr_valid,
  input  comp_hdr_t       chdr,
  input  logic            pay_we,
  input  logic [15:0]     pay_idx,
  input  logic [DW-1:0]   pay_data,
  input  logic            commit,
  input  logic            clear,
  output logic            frag_ok,
  output logic            complete,
  output task_id_t        pkg_task,
  output logic [31:0]     pkg_size,
  input  logic [AW-1:0]   rd_addr,
  output logic [DW-1:0]   rd_data
);

  localparam int unsigned FRAG_WORDS = (FRAG_BYTES + BPW - 1) / BPW;
  localparam int unsigned BUF_BYTES  = BUF_WORDS * BPW;
  localparam int unsigned MAX_FRAGS  = (BUF_BYTES + FRAG_BYTES - 1) / FRAG_BYTES;
  localparam int unsigned FIW        = (MAX_FRAGS > 1) ? $clog2(MAX_FRAGS) : 1;

  logic [DW-1:0]        mem [BUF_WORDS];
  logic                 have_pkg_q;
  logic [MAX_FRAGS-1:0] got_q;
  logic [15:0]          nfrags_q;
  logic [15:0]          frag_q;
  logic [AW-1:0]        base_q;

  // Checks on the header being presented.
  logic        hdr_fits;
  logic [31:0] frag_start;   // first byte of this fragment in the package
  logic [31:0] expect_size;
  logic        hdr_good;
  logic        same_pkg;
  logic        busy;         // some fragment of the current package is committed
  logic        accept;

  always_comb begin
    frag_start  = 32'(chdr.frag) * FRAG_BYTES;
    hdr_fits    = (chdr.total_size != 32'd0) && (chdr.total_size <= BUF_BYTES) &&
                  (32'(chdr.total_frags) <= MAX_FRAGS) &&
                  ((32'(chdr.total_frags) - 32'd1) * FRAG_BYTES < chdr.total_size) &&
                  (32'(chdr.total_frags) * FRAG_BYTES >= chdr.total_size) &&
                  (chdr.frag < chdr.total_frags);
    expect_size = (chdr.frag == chdr.total_frags - 16'd1) ? chdr.total_size - frag_start
                                                          : 32'(FRAG_BYTES);
    hdr_good    = hdr_fits && (32'(chdr.size) == expect_size);
    same_pkg    = have_pkg_q && (chdr.task_id == pkg_task) && (chdr.total_size == pkg_size);
    busy        = |got_q;
    accept      = hdr_good && (same_pkg || !busy);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_pkg_q <= 1'b0;
      got_q      <= '0;
      nfrags_q   <= '0;
      frag_q     <= '0;
      base_q     <= '0;
      frag_ok    <= 1'b0;
      pkg_task   <= '0;
      pkg_size   <= '0;
    end else if (clear) begin
      have_pkg_q <= 1'b0;
      got_q      <= '0;
      frag_ok    <= 1'b0;
    end else begin
      if (hdr_valid) begin
        frag_ok <= accept;
        frag_q  <= chdr.frag;
        base_q  <= AW'(32'(chdr.frag) * FRAG_WORDS);
        if (accept && !same_pkg) begin
          have_pkg_q <= 1'b1;
          got_q      <= '0;
          nfrags_q   <= chdr.total_frags;
          pkg_task   <= chdr.task_id;
          pkg_size   <= chdr.total_size;
        end
      end
      if (commit && frag_ok) got_q[frag_q[FIW-1:0]] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (pay_we && frag_ok && !hdr_valid) mem[base_q + AW'(pay_idx)] <= pay_data;
    rd_data <= mem[rd_addr];
  end

  // All fragments 0 .. nfrags-1 present.
  always_comb begin
    complete = have_pkg_q;
    for (int unsigned i = 0; i < MAX_FRAGS; i++)
      if (i < 32'(nfrags_q) && !got_q[i]) complete = 1'b0;
  end

endmodule
