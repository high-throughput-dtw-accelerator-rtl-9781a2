// minimum_unit: selects the smallest of the three neighbours of the DTW
// matrix element being computed: w(i,j-1) from Last, w(i-1,j) from the end of
// Band and w(i-1,j-1) from Output.
//
// It is built, as the design prescribes, from two comparators and two
// multiplexers in a chain: the first picks the smaller of Last and Band, the
// second the smaller of that and Output. The values are non-negative
// single-precision numbers or +Inf, whose bit patterns order like unsigned
// integers, so each comparator is a plain 31-bit magnitude compare (the sign
// bit is always 0). That reduction of the floating-point compare is this
// design's choice. Combinational.
module minimum_unit
  import dtw_pkg::*;
(
  input  fp32_t last_v,
  input  fp32_t band_v,
  input  fp32_t out_v,
  output fp32_t min_v
);

  fp32_t m1;

  always_comb begin
    m1    = ({last_v.exp, last_v.man} <= {band_v.exp, band_v.man}) ? last_v : band_v;
    min_v = ({m1.exp, m1.man} <= {out_v.exp, out_v.man}) ? m1 : out_v;
  end

endmodule
