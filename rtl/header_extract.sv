// header_extract: selects up to EXT_W header bits with a bit mask and packs them.
//
// The four header bytes that carry GFC/VPI/VCI/PT/CLP are held as one 32-bit
// word, header byte 0 in bits [31:24] (first transmitted) and the CLP bit in
// bit 0. The mask word is the concatenation of the four 8-bit header mask
// registers in the same order. Every header bit whose mask bit is set is
// taken; the taken bits keep their order and are packed towards bit 0, so the
// last taken header bit lands in idx[0]. If fewer than EXT_W bits are set the
// upper index bits are zero; if more are set only the last EXT_W are used,
// as the document prescribes. The document states both 8 and 16 as the
// number of usable bits; EXT_W defaults to 16, which gives the 64K connections
// per link that it also states.
//
// Each bit's output position is the number of set mask bits below it, so all
// positions are computed in parallel. Purely combinational.
module header_extract
  import upc_pkg::*;
#(
  parameter int unsigned HW = HDR_W,   // header bits covered by the masks
  parameter int unsigned XW = EXT_W    // extracted index width
) (
  input  logic [HW-1:0] hdr,   // header bytes 0..3
  input  logic [HW-1:0] mask,  // mask registers 0..3
  output logic [XW-1:0] idx    // packed selected bits
);

  always_comb begin
    int unsigned pos;
    idx = '0;
    pos = 0;
    for (int unsigned p = 0; p < HW; p++) begin
      if (mask[p]) begin
        if (pos < XW) idx[pos] = hdr[p];
        pos++;
      end
    end
  end

endmodule
