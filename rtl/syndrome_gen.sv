// syndrome_gen: syndrome generator, s = H * v^T over the extended codeword.
//
// The received data bits are encoded again with the same XOR trees as the check bit generator
// and the result is XORed with the received base and additional check bits. A zero syndrome
// means no error; a syndrome equal to one column of H points at a single flipped bit. All
// NSPARE additional syndrome bits are produced; bits whose cells hold no valid check bit are
// masked afterwards (error_detect, correction_logic).
//
// Interface: data_i, base_i, extra_i in; s_base_o (R0 bits), s_extra_o (NSPARE bits) out.
// Timing: combinational. Regenerating the check bits to form the syndrome is the standard
// structure; the scheme only defines the syndrome as H times the received word.
module syndrome_gen
  import ecc_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned NSPARE = 4,
  localparam int unsigned R0    = base_r(DATA_W)
) (
  input  logic [DATA_W-1:0] data_i,
  input  logic [R0-1:0]     base_i,
  input  logic [NSPARE-1:0] extra_i,
  output logic [R0-1:0]     s_base_o,
  output logic [NSPARE-1:0] s_extra_o
);
  logic [R0-1:0]     base_re;
  logic [NSPARE-1:0] extra_re;

  check_bit_gen #(.DATA_W(DATA_W), .NSPARE(NSPARE)) u_regen (
    .data_i (data_i),
    .base_o (base_re),
    .extra_o(extra_re)
  );

  assign s_base_o  = base_re ^ base_i;
  assign s_extra_o = extra_re ^ extra_i;
endmodule
