// savi_pkg: types and constants shared by the blocks of the FPGA stream compute node.
//
// The node exchanges raw Ethernet frames over a 64-bit stream (8 bytes per beat, the first byte
// on the wire in bits [7:0]). Three EtherTypes separate compute data, control (table updates)
// and acknowledgement frames. Multi-byte fields are big-endian, as is usual on the wire.
//
// Frame layouts (byte offsets from the start of the frame):
//   all frames   0..5 destination MAC, 6..11 source MAC, 12..13 EtherType
//   data         14..15 task ID, 16..17 fragment size in bytes, 18..19 fragment number,
//                20..21 total fragments, 22..25 total package size in bytes, 26..27 input ID,
//                28..31 reserved, 32.. payload (so the payload starts on a beat boundary)
//   control      14..15 opcode, 16..17 number of entries, 18..23 reserved, 24.. one 8-byte
//                entry per beat
//   ack          14..21 a copy of bytes 14..21 of the frame being acknowledged
// Node entry (8 bytes): node ID, address type, 6-byte address.
// Task entry (8 bytes): task ID (2), procedure ID (2), destination node ID (1), reserved (3).
//
// The field list of the compute header and of the two control messages follows the design
// description; the field widths, their order on the wire, the EtherType and opcode values and
// the acknowledgement format are this design's own choices.
package savi_pkg;

  localparam int unsigned DW = 64;            // stream width in bits
  localparam int unsigned BPW = DW / 8;       // bytes per beat / buffer word

  localparam logic [15:0] ETYPE_DATA = 16'h88B5;
  localparam logic [15:0] ETYPE_CTRL = 16'h88B6;
  localparam logic [15:0] ETYPE_ACK  = 16'h88B7;

  localparam logic [15:0] OP_ADD_NODES = 16'h0001;
  localparam logic [15:0] OP_ADD_TASKS = 16'h0002;

  localparam logic [7:0] ADDR_TYPE_ETH = 8'h01;   // 48-bit MAC address, the only type built

  // Largest payload of one data frame: 1500-byte Ethernet payload minus the 18-byte compute
  // header, rounded down to whole 8-byte words.
  localparam int unsigned MAX_FRAG_BYTES = 1480;

  // Beats of header before the payload of a data frame, and the length of an ACK frame.
  localparam int unsigned DATA_HDR_BEATS = 4;
  localparam int unsigned ACK_BYTES      = 22;

  typedef logic [47:0] mac_t;
  typedef logic [15:0] task_id_t;
  typedef logic [15:0] proc_id_t;
  typedef logic [7:0]  node_id_t;

  typedef struct packed {
    task_id_t    task_id;
    logic [15:0] size;         // payload bytes in this fragment
    logic [15:0] frag;         // fragment number, 0-based
    logic [15:0] total_frags;
    logic [31:0] total_size;   // bytes in the whole package
    logic [15:0] input_id;
  } comp_hdr_t;

  typedef struct packed {
    task_id_t task_id;
    proc_id_t proc_id;
    node_id_t dest;
  } task_entry_t;

  typedef struct packed {
    node_id_t   node_id;
    logic [7:0] addr_type;
    mac_t       addr;
  } node_entry_t;

  typedef enum logic [1:0] {
    K_OTHER = 2'd0,
    K_DATA  = 2'd1,
    K_CTRL  = 2'd2,
    K_ACK   = 2'd3
  } frame_kind_e;

  // Byte i of a little-lane-first byte vector (byte 0 in bits [7:0]).
  function automatic logic [7:0] byte_at(input logic [255:0] v, input int unsigned i);
    return v[8*i +: 8];
  endfunction

  // Big-endian 16-bit field at byte offset i.
  function automatic logic [15:0] be16(input logic [255:0] v, input int unsigned i);
    return {v[8*i +: 8], v[8*(i+1) +: 8]};
  endfunction

  // Decode an 8-byte entry beat as a task entry.
  function automatic task_entry_t decode_task_entry(input logic [63:0] b);
    task_entry_t e;
    e.task_id = {b[7:0], b[15:8]};
    e.proc_id = {b[23:16], b[31:24]};
    e.dest    = b[39:32];
    return e;
  endfunction

  // Decode an 8-byte entry beat as a node entry.
  function automatic node_entry_t decode_node_entry(input logic [63:0] b);
    node_entry_t e;
    e.node_id   = b[7:0];
    e.addr_type = b[15:8];
    e.addr      = {b[23:16], b[31:24], b[39:32], b[47:40], b[55:48], b[63:56]};
    return e;
  endfunction

endpackage
