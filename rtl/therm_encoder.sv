// therm_encoder: binary to thermometer decoder that drives the unit current cells.
//
// An M-bit code selects how many of the 2^M - 1 unit elements are switched on.
// Output bit t[k-1] (the element numbered k, k = 1 .. 2^M - 1) is 1 exactly when
// the unsigned level is at least k, so the ones fill the word from bit 0 upward
// and their count equals the level. For M = 3 and unsigned input this is the
// decoding table 000 -> none, 001 -> T1, 010 -> T1..T2, ..., 111 -> T1..T7,
// with Tk in bit k-1.
//
// With TWOS_COMP = 1 (the default, since the modulator emits two's complement
// codes) the code is first offset by 2^(M-1): -2^(M-1) selects no element and
// 2^(M-1)-1 selects all of them.
//
// The block is purely combinational: the thermometer word follows the code in
// the same cycle. The decoding rule follows the specification; the ordering of
// the elements inside the word and the offset for signed codes are this
// design's choices.
module therm_encoder
  import adsl_dac_pkg::*;
#(
  parameter int M         = SDM_BITS,
  parameter bit TWOS_COMP = 1'b1
) (
  input  logic [M-1:0]        code,
  output logic [(1<<M)-2:0]   therm
);

  logic [M-1:0] level;

  always_comb begin
    level = TWOS_COMP ? (code ^ (M'(1) << (M - 1))) : code;  // add 2^(M-1) mod 2^M
    for (int k = 1; k < (1 << M); k++) therm[k-1] = ({1'b0, level} >= (M+1)'(k));
  end

endmodule
