// signal_mapper: binary signal mapper with the labelling K1.
//
// The labelling 4-tuple s(t) = (s1..s4) is mapped onto the binary channel
// symbol z(t) = s(t) * K1 over GF(2), where the rows of K1 are (1000),
// (1100), (1110), (1111). Changing only s_j changes j bits of z, so the
// levels carry distances 1,2,3,4: the most delayed level is the weakest.
// Writing the labelling as a row-vector product is this design's reading
// of K1; it is the one that gives those distances. Each bit z_k is sent
// as an antipodal symbol (0 -> -1, 1 -> +1) by the modulator.
//
// Interface/timing: purely combinational, bit j-1 is level j.
module signal_mapper
  import tbt_pkg::*;
(
  input  logic [M-1:0] s,
  output logic [M-1:0] z
);

  always_comb z = map_k1(s);

endmodule
