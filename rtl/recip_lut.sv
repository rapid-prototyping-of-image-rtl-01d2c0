// Reciprocal look-up table that replaces the divider of the stretch equation.
//
// Entry d holds 1/d as an unsigned fixed-point word of RECIP_W bits with
// RECIP_FRAC fraction bits (16 bits, 15 fraction bits: 1/1 is 32768 and
// 1/255 is 128), rounded to nearest: entry(d) = floor((2^15 + d/2) / d).
// Entry 0 has no reciprocal; it holds the value for d = 1 so that a frame
// whose limits have met still gives a defined, saturating output.
// The table is computed at elaboration time by a constant function and read
// as a synchronous ROM.
//
// Interface: addr_i is the 8-bit range h_high - h_low.
// Timing: data_o is valid one ce-qualified cycle after addr_i.
//
// Storing reciprocals of the range, their 16-bit/15-fraction format and the
// 256-entry size follow the original design; the rounding and the entry 0 are this
// implementation's choices.
module recip_lut
  import cs_pkg::*;
#(
  parameter int unsigned ADDR_W = PIX_W,
  parameter int unsigned DATA_W = RECIP_W,
  parameter int unsigned FRAC_W = RECIP_FRAC
) (
  input  logic              clk,
  input  logic              ce,
  input  logic [ADDR_W-1:0] addr_i,
  output logic [DATA_W-1:0] data_o
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  typedef logic [DEPTH-1:0][DATA_W-1:0] table_t;

  function automatic table_t make_table();
    table_t t;
    longint unsigned one;
    longint unsigned d;
    one = longint'(1) << FRAC_W;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      d    = (i == 0) ? 1 : longint'(i);
      t[i] = DATA_W'((one + d / 2) / d);
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_ff @(posedge clk) begin
    if (ce) data_o <= TABLE[addr_i];
  end

endmodule
