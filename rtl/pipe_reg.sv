// pipe_reg: one pipeline register (IF/DE, DE/EX, EX/ME or ME/WB) with a valid
// bit.
//
// The payload is any packed type T, so the same register carries both the
// data of a stage and its data-stationary control.  Each rising edge:
//   rst            -> valid cleared (payload left alone: nothing reads it
//                     while valid is low, except through valid-gated logic)
//   en == 0        -> register holds (the stage's clock enable is off: stall)
//   en && bubble   -> valid cleared, i.e. a nop enters the next stage
//   en && !bubble  -> valid <= in_valid, data <= in_data
// Stall by clock enable and bubble by clearing the valid bit follow the
// stalling recipe of the lecture material; a cleared valid bit is the nop.
// Outputs are the register contents (no combinational path from inputs).
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic bubble,
  input  logic in_valid,
  input  T     in_data,
  output logic out_valid,
  output T     out_data
);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
    end else if (en) begin
      out_valid <= in_valid && !bubble;
      out_data  <= in_data;
    end
  end

endmodule
