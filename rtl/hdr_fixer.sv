// hdr_fixer: path meta header update made by an intermediate hop.
//
// After a packet has been verified, the next AS must find its own hop field, so CurrHF
// is advanced by one. When that moves CurrHF past the last hop field of the current
// segment, CurrINF is advanced to the next info field as well. Segment boundaries come
// from the Seg0Len/Seg1Len/Seg2Len fields; the other fields pass unchanged. Which
// fields to advance follows the SCION path format; the SegID update of plain SCION
// paths is not made. Purely
// combinational; the ingress pipeline registers the result.
module hdr_fixer
  import scion_pkg::*;
(
  input  path_meta_t meta_in,
  output path_meta_t meta_out
);

  logic [7:0] next_hf;

  always_comb begin
    meta_out         = meta_in;
    next_hf          = 8'(meta_in.curr_hf) + 8'd1;
    meta_out.curr_hf = next_hf[5:0];
    if (next_hf == seg_end(meta_in, meta_in.curr_inf) && meta_in.curr_inf != 2'd3)
      meta_out.curr_inf = meta_in.curr_inf + 2'd1;
  end

endmodule
