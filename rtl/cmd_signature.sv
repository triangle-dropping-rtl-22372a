// Command Signature register.
//
// When the command processor issues a draw command, this unit hashes the
// command's static state (vertex and primitive counts, depth-test and
// blending settings, shader entry points and attribute counts, primitive
// type) into a 64-bit CRC and holds it until the next command. The signature
// identifies "the same object" across frames together with its bounding box.
//
// The CRC is computed in one cycle over the packed cmd_state_t, most
// significant bit first, with the CRC-64/ECMA-182 polynomial and a zero
// initial value. Using a 64-bit CRC of the static state follows the
// technique's description; the polynomial, bit order and field widths are
// this design's choice.
//
// Interface: start with state -> sig_valid and signature one cycle later.
// sig_valid stays high until the next start.
module cmd_signature
  import td_pkg::*;
#(
  parameter logic [SIG_W-1:0] POLY = 64'h42F0_E1EB_A9EA_3693
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  cmd_state_t state,
  output logic       sig_valid,
  output sig_t       signature
);

  localparam int unsigned NBITS = $bits(cmd_state_t);

  function automatic sig_t crc64(input logic [NBITS-1:0] data);
    sig_t c;
    logic fb;
    c = '0;
    for (int i = NBITS - 1; i >= 0; i--) begin
      fb = c[SIG_W-1] ^ data[i];
      c  = {c[SIG_W-2:0], 1'b0};
      if (fb) c = c ^ POLY;
    end
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_valid <= 1'b0;
      signature <= '0;
    end else if (start) begin
      sig_valid <= 1'b1;
      signature <= crc64(state);
    end
  end

endmodule
