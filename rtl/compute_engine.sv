// compute_engine: runs the node's procedure over a complete package. It reads the package word
// by word from the input buffer, passes each word through the procedure and writes the result
// to the same place in the output buffer.
//
// The node has a single procedure, the identity (basic forwarding), which is what the working
// nodes of the design perform; procedure() is where another word-wise transformation would go,
// selected by the procedure ID from the task table. Reads are issued one per cycle; the input
// buffer answers one cycle later, when the word is written out, so for a package of N words
// done rises N+1 clock edges after the edge that takes start.
//
// Interface: start (one cycle) with nwords and proc_id; in_rd_addr/in_rd_data is the input
// buffer's read port (one cycle of latency); out_we/out_waddr/out_wdata the output buffer's
// write port; busy is high from start to done, done pulses when the last word is written.
// nwords = 0 finishes at once.
//
// Following the design description: the procedure named in the task table is applied to the
// package from the input buffer and the result goes to the output buffer; only the identity is
// provided. This design's choices: word-serial processing, the timing above.
module compute_engine
  import savi_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 2048,
  localparam int unsigned AW       = $clog2(BUF_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW:0]   nwords,
  input  proc_id_t      proc_id,
  output logic [AW-1:0] in_rd_addr,
  input  logic [DW-1:0] in_rd_data,
  output logic          out_we,
  output logic [AW-1:0] out_waddr,
  output logic [DW-1:0] out_wdata,
  output logic          busy,
  output logic          done
);

  // The node's procedure, applied to one word. Every procedure ID selects the identity.
  function automatic logic [DW-1:0] procedure(input proc_id_t id, input logic [DW-1:0] w);
    logic unused;
    unused = ^id;
    return w;
  endfunction

  logic [AW:0]   rd_ptr_q;
  logic [AW:0]   n_q;
  logic          run_q;
  logic          vld_q;     // a read was issued last cycle
  logic          last_q;    // ... and it was the last one
  logic [AW-1:0] waddr_q;
  proc_id_t      proc_q;

  assign in_rd_addr = rd_ptr_q[AW-1:0];
  assign busy       = run_q || vld_q;
  assign out_we     = vld_q;
  assign out_waddr  = waddr_q;
  assign out_wdata  = procedure(proc_q, in_rd_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr_q <= '0;
      n_q      <= '0;
      run_q    <= 1'b0;
      vld_q    <= 1'b0;
      last_q   <= 1'b0;
      waddr_q  <= '0;
      proc_q   <= '0;
      done     <= 1'b0;
    end else begin
      done  <= 1'b0;
      vld_q <= 1'b0;
      if (start && !busy) begin
        rd_ptr_q <= '0;
        n_q      <= nwords;
        proc_q   <= proc_id;
        run_q    <= (nwords != '0);
        done     <= (nwords == '0);
      end else if (run_q) begin
        vld_q    <= 1'b1;
        waddr_q  <= rd_ptr_q[AW-1:0];
        last_q   <= (rd_ptr_q + 1'b1 == n_q);
        rd_ptr_q <= rd_ptr_q + 1'b1;
        if (rd_ptr_q + 1'b1 == n_q) run_q <= 1'b0;
      end
      if (vld_q && last_q) done <= 1'b1;
    end
  end

endmodule
