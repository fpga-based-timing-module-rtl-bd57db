// tb_tlp_pkg: testbench helpers that build PCI Express TLPs as they
// appear on a 64-bit transaction interface (one QWORD per beat, first
// DWORD in bits 63:32, trem_n = 0Fh when the last QWORD holds one DWORD).
// Payload DWORDs are given in register order and byte-swapped into the
// little-endian link order, as a root complex would send them.
package tb_tlp_pkg;
  typedef struct {
    logic [63:0] d;
    bit          sof;
    bit          eof;
    logic [7:0]  rem_n;
  } beat_t;
  typedef beat_t tlp_t[$];

  function automatic logic [31:0] sw(input logic [31:0] d);
    return {d[7:0], d[15:8], d[23:16], d[31:24]};
  endfunction

  function automatic logic [31:0] hdr0(input logic [6:0] ft, input logic [9:0] len);
    return {1'b0, ft, 14'h0, len};
  endfunction

  function automatic tlp_t pack(input logic [31:0] dws[$]);
    tlp_t t;
    for (int i = 0; i < dws.size(); i += 2) begin
      beat_t b;
      b.sof = (i == 0);
      b.eof = (i + 2 >= dws.size());
      if (i + 1 < dws.size()) begin
        b.d = {dws[i], dws[i+1]}; b.rem_n = 8'h00;
      end else begin
        b.d = {dws[i], 32'h0}; b.rem_n = 8'h0F;
      end
      t.push_back(b);
    end
    return t;
  endfunction

  // memory write, one DWORD, 32-bit address (3DW header)
  function automatic tlp_t mwr32(input logic [31:0] addr, input logic [31:0] data,
                                 input logic [3:0] be = 4'hF, input logic [7:0] tag = 8'h0);
    logic [31:0] q[$];
    q = '{hdr0(7'b10_00000, 10'd1), {16'h0100, tag, 4'h0, be}, addr, sw(data)};
    return pack(q);
  endfunction

  // memory write, one DWORD, 64-bit address (4DW header)
  function automatic tlp_t mwr64(input logic [31:0] addr, input logic [31:0] data,
                                 input logic [3:0] be = 4'hF);
    logic [31:0] q[$];
    q = '{hdr0(7'b11_00000, 10'd1), {16'h0100, 8'h00, 4'h0, be}, 32'h1, addr, sw(data)};
    return pack(q);
  endfunction

  function automatic tlp_t mrd32(input logic [31:0] addr, input logic [7:0] tag,
                                 input logic [3:0] be = 4'hF, input logic [15:0] rid = 16'h0100);
    logic [31:0] q[$];
    q = '{hdr0(7'b00_00000, 10'd1), {rid, tag, 4'h0, be}, addr};
    return pack(q);
  endfunction

  function automatic tlp_t mrd64(input logic [31:0] addr, input logic [7:0] tag);
    logic [31:0] q[$];
    q = '{hdr0(7'b01_00000, 10'd1), {16'h0100, tag, 4'h0, 4'hF}, 32'h1, addr};
    return pack(q);
  endfunction

  function automatic tlp_t iowr(input logic [31:0] addr, input logic [31:0] data,
                                input logic [7:0] tag);
    logic [31:0] q[$];
    q = '{hdr0(7'b10_00010, 10'd1), {16'h0100, tag, 4'h0, 4'hF}, addr, sw(data)};
    return pack(q);
  endfunction

  // completion with data carrying the given DWORDs (register order)
  function automatic tlp_t cpld(input logic [15:0] req_id, input logic [7:0] tag,
                                input logic [31:0] data[$]);
    logic [31:0] q[$];
    q = '{hdr0(7'b10_01010, 10'(data.size())),
          {16'h0000, 4'h0, 12'(4 * data.size())}, {req_id, tag, 8'h00}};
    foreach (data[i]) q.push_back(sw(data[i]));
    return pack(q);
  endfunction

  // unpack the DWORDs of a received TLP
  function automatic void unpack(input tlp_t t, ref logic [31:0] dws[$]);
    dws.delete();
    foreach (t[i]) begin
      dws.push_back(t[i].d[63:32]);
      if (t[i].rem_n == 8'h00) dws.push_back(t[i].d[31:0]);
    end
  endfunction
endpackage
