// output_buffer: holds a processed package and cuts it into fragments, one per outgoing frame.
//
// The memory is written by the compute engine and read by the frame transmitter (one cycle of
// read latency). Loading a package size starts the fragment sequence at fragment 0; each
// advance moves to the next fragment. For the current fragment it gives the fragment number,
// its size in bytes (FRAG_BYTES, except for a shorter last one), the word address where it
// starts, the fragment count and whether it is the last. The fragment count is the number of
// FRAG_BYTES-byte steps that start below the package size, found by comparing the size with
// every multiple of FRAG_BYTES up to the buffer size.
//
// Timing: load and advance take effect at the next clock edge; all fragment outputs are
// registered or derived from registers.
//
// Following the design description: the output buffer, where the package is broken down into
// Ethernet frames for the next hop. This design's choices: fixed-size fragments and the
// interface above.
module output_buffer
  import savi_pkg::*;
#(
  parameter int unsigned BUF_WORDS  = 2048,
  parameter int unsigned FRAG_BYTES = MAX_FRAG_BYTES,
  localparam int unsigned AW        = $clog2(BUF_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port (compute engine)
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  // read port (frame transmitter)
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data,
  // fragment sequence
  input  logic          load,
  input  logic [31:0]   pkg_size,
  input  logic          advance,
  output logic [15:0]   cur_frag,
  output logic [15:0]   cur_bytes,
  output logic [AW-1:0] cur_base,
  output logic [15:0]   nfrags,
  output logic          last_frag
);

  localparam int unsigned FRAG_WORDS = (FRAG_BYTES + BPW - 1) / BPW;
  localparam int unsigned BUF_BYTES  = BUF_WORDS * BPW;
  localparam int unsigned MAX_FRAGS  = (BUF_BYTES + FRAG_BYTES - 1) / FRAG_BYTES;

  logic [DW-1:0] mem [BUF_WORDS];
  logic [31:0]   remain_q;   // bytes from the current fragment to the end
  logic [15:0]   nfrags_d;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rd_data <= mem[rd_addr];
  end

  always_comb begin
    nfrags_d = '0;
    for (int unsigned i = 0; i < MAX_FRAGS; i++)
      if (pkg_size > i * FRAG_BYTES) nfrags_d = 16'(i + 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remain_q <= '0;
      cur_frag <= '0;
      cur_base <= '0;
      nfrags   <= '0;
    end else if (load) begin
      remain_q <= pkg_size;
      cur_frag <= '0;
      cur_base <= '0;
      nfrags   <= nfrags_d;
    end else if (advance && !last_frag) begin
      remain_q <= remain_q - FRAG_BYTES;
      cur_frag <= cur_frag + 16'd1;
      cur_base <= cur_base + AW'(FRAG_WORDS);
    end
  end

  assign cur_bytes = (remain_q > FRAG_BYTES) ? 16'(FRAG_BYTES) : remain_q[15:0];
  assign last_frag = (cur_frag + 16'd1 >= nfrags);

endmodule
