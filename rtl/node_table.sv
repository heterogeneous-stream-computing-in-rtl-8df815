// node_table: translates a destination node ID into the address used to reach that node.
// Keeping node IDs apart from addresses separates the graph of compute resources from how the
// nodes are physically reached; an entry records the address type as well as the address.
//
// It is a small fully associative table (ENTRIES slots, each a valid bit and a node entry).
// A write with a node ID already present overwrites that entry; otherwise the entry goes into
// the lowest free slot; when every slot is taken the write is dropped and full stays high.
// A lookup compares the key with all slots at once; hit, addr_type and addr are registered and
// valid the cycle after lk_req. Reset empties the table.
//
// Following the design description: node ID -> address type and address, entries added by
// control frames, a small table on the FPGA. This design's choices: the number of slots, an
// address field of 48 bits (an Ethernet MAC address; other address types are stored but the
// node only sends to type ADDR_TYPE_ETH), overwrite on a repeated key.
module node_table
  import savi_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  node_entry_t wentry,
  input  logic        lk_req,
  input  node_id_t    lk_key,
  output logic        lk_hit,
  output logic [7:0]  lk_type,
  output mac_t        lk_addr,
  output logic        full
);

  logic        valid_q [ENTRIES];
  node_entry_t ent_q   [ENTRIES];

  logic                       w_match, w_free;
  logic [$clog2(ENTRIES)-1:0] w_match_idx, w_free_idx;
  logic                       l_hit;
  node_entry_t                l_ent;

  always_comb begin
    w_match = 1'b0; w_match_idx = '0;
    w_free  = 1'b0; w_free_idx  = '0;
    l_hit   = 1'b0; l_ent       = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid_q[i] && ent_q[i].node_id == wentry.node_id) begin
        w_match = 1'b1; w_match_idx = i[$clog2(ENTRIES)-1:0];
      end
      if (!valid_q[i]) begin
        w_free = 1'b1; w_free_idx = i[$clog2(ENTRIES)-1:0];
      end
      if (valid_q[i] && ent_q[i].node_id == lk_key) begin
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
      lk_type <= '0;
      lk_addr <= '0;
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
        lk_type <= l_ent.addr_type;
        lk_addr <= l_ent.addr;
      end
    end
  end

endmodule
