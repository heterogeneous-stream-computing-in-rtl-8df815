// tb_pkg: frame building helpers shared by the testbenches. Frames are byte queues, byte 0
// first on the wire; to_beats() packs them into 64-bit beats with byte 0 in bits [7:0]. The
// layouts are written out here byte by byte, independently of the RTL's parser and builder.
package tb_pkg;

  typedef logic [7:0] bytes_t[$];
  typedef logic [63:0] beats_t[$];

  function automatic void put_mac(ref bytes_t q, input logic [47:0] m);
    for (int i = 5; i >= 0; i--) q.push_back(m[8*i +: 8]);
  endfunction

  function automatic void put16(ref bytes_t q, input logic [15:0] v);
    q.push_back(v[15:8]);
    q.push_back(v[7:0]);
  endfunction

  function automatic void put32(ref bytes_t q, input logic [31:0] v);
    put16(q, v[31:16]);
    put16(q, v[15:0]);
  endfunction

  function automatic bytes_t eth_hdr(input logic [47:0] dst, input logic [47:0] src,
                                     input logic [15:0] etype);
    bytes_t q;
    put_mac(q, dst);
    put_mac(q, src);
    put16(q, etype);
    return q;
  endfunction

  // Data frame carrying bytes [off, off+size) of pkg.
  function automatic bytes_t data_frame(input logic [47:0] dst, input logic [47:0] src,
                                        input logic [15:0] task_id, input int size,
                                        input int frag, input int tfrags, input int tsize,
                                        input bytes_t pkg, input int off);
    bytes_t q;
    q = eth_hdr(dst, src, 16'h88B5);
    put16(q, task_id);
    put16(q, 16'(size));
    put16(q, 16'(frag));
    put16(q, 16'(tfrags));
    put32(q, 32'(tsize));
    put16(q, 16'h0000);
    put32(q, 32'h0);
    for (int i = 0; i < size; i++) q.push_back(pkg[off + i]);
    return q;
  endfunction

  // Control frame with 8-byte entries.
  function automatic bytes_t ctrl_frame(input logic [47:0] dst, input logic [47:0] src,
                                        input logic [15:0] op, input bytes_t entries);
    bytes_t q;
    q = eth_hdr(dst, src, 16'h88B6);
    put16(q, op);
    put16(q, 16'(entries.size() / 8));
    for (int i = 0; i < 6; i++) q.push_back(8'h00);
    foreach (entries[i]) q.push_back(entries[i]);
    return q;
  endfunction

  function automatic void node_entry(ref bytes_t q, input logic [7:0] id,
                                     input logic [7:0] atype, input logic [47:0] mac);
    q.push_back(id);
    q.push_back(atype);
    put_mac(q, mac);
  endfunction

  function automatic void task_entry(ref bytes_t q, input logic [15:0] task_id,
                                     input logic [15:0] proc_id, input logic [7:0] dest);
    put16(q, task_id);
    put16(q, proc_id);
    q.push_back(dest);
    for (int i = 0; i < 3; i++) q.push_back(8'h00);
  endfunction

  // Acknowledgement of frame f, sent from src to dst.
  function automatic bytes_t ack_frame(input logic [47:0] dst, input logic [47:0] src,
                                       input bytes_t f);
    bytes_t q;
    q = eth_hdr(dst, src, 16'h88B7);
    for (int i = 14; i < 22; i++) q.push_back(f[i]);
    return q;
  endfunction

  function automatic beats_t to_beats(input bytes_t q);
    beats_t b;
    logic [63:0] w;
    w = '0;
    for (int i = 0; i < q.size(); i++) begin
      w[8*(i%8) +: 8] = q[i];
      if (i % 8 == 7 || i == q.size() - 1) begin
        b.push_back(w);
        w = '0;
      end
    end
    return b;
  endfunction

  // Pseudo-random package contents.
  function automatic bytes_t make_pkg(input int n, input int seed);
    bytes_t q;
    for (int i = 0; i < n; i++) q.push_back(8'((i * 37 + seed * 101 + (i >> 3)) ^ (i >> 8)));
    return q;
  endfunction

endpackage
