// task_table: the forwarding table of the compute node. For each task ID it holds the
// procedure to run on a package of that task and the node the result goes to next.
//
// It is a small fully associative table (ENTRIES slots, each a valid bit and a task entry).
// A write with a task ID already present overwrites that entry; otherwise the entry goes into
// the lowest free slot; when every slot is taken the write is dropped and full stays high.
// A lookup compares the key with all slots at once; hit, proc_id and dest are registered and
// valid the cycle after lk_req. Reset empties the table.
//
// Following the design description: task ID -> procedure and destination node, entries added
// by control frames, and a table kept small on the FPGA. This design's choices: the number of
// slots, associative search, overwrite on a repeated key and ignoring writes to a full table.
module task_table
  import savi_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  task_entry_t wentry,
  input  logic        lk_req,
  input  task_id_t    lk_key,
  output logic        lk_hit,
  output proc_id_t    lk_proc,
  output node_id_t    lk_dest,
  output logic        full
);

  logic        valid_q [ENTRIES];
  task_entry_t ent_q   [ENTRIES];

  // Slot for a write: the matching one, else the lowest free one.
  logic                       w_match, w_free;
  logic [$clog2(ENTRIES)-1:0] w_match_idx, w_free_idx;
  logic                       l_hit;
  task_entry_t                l_ent;

  always_comb begin
    w_match = 1'b0; w_match_idx = '0;
    w_free  = 1'b0; w_free_idx  = '0;
    l_hit   = 1'b0; l_ent       = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid_q[i] && ent_q[i].task_id == wentry.task_id) begin
        w_match = 1'b1; w_match_idx = i[$clog2(ENTRIES)-1:0];
      end
      if (!valid_q[i]) begin
        w_free = 1'b1; w_free_idx = i[$clog2(ENTRIES)-1:0];
      end
      if (valid_q[i] && ent_q[i].task_id == lk_key) begin
        l_hit = 1'b1; l_ent = ent_q[i];
      end
    end
    full = !w_free;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        valid_q[i] <= 1'b0;
        ent_q[i]   <= '0;
      end
      lk_hit  <= 1'b0;
      lk_proc <= '0;
      lk_dest <= '0;
    end else begin
      if (we) begin
        if (w_match) begin
          ent_q[w_match_idx] <= wentry;
        end else if (w_free) begin
          ent_q[w_free_idx]   <= wentry;
          valid_q[w_free_idx] <= 1'b1;
        end
      end
      if (lk_req) begin
        lk_hit  <= l_hit;
        lk_proc <= l_ent.proc_id;
        lk_dest <= l_ent.dest;
      end
    end
  end

endmodule
