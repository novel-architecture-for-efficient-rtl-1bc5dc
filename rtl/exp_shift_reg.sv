// exp_shift_reg: exponent shift register.
//
// Holds the KE-bit exponent E and presents one bit e_i at a time. load
// copies E in; update shifts to the next bit. With LSB_FIRST = 1 the bits
// come out e_0, e_1, ... (right-to-left exponentiation); with LSB_FIRST = 0
// they come out e_(KE-1), e_(KE-2), ... (left-to-right exponentiation).
// The Load/Update/e_i interface is the document's; the direction parameter
// is this design's way of serving both exponentiators with one module.
// load takes priority over update; e_i is valid in the clock after load.
module exp_shift_reg #(
  parameter int unsigned KE        = 1024,
  parameter bit          LSB_FIRST = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          update,
  input  logic [KE-1:0] e,
  output logic          e_i
);

  logic [KE-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sr <= '0;
    else if (load)   sr <= e;
    else if (update) sr <= LSB_FIRST ? (sr >> 1) : (sr << 1);
  end

  assign e_i = LSB_FIRST ? sr[0] : sr[KE-1];

endmodule
