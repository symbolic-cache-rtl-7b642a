// pcolor_counter: the global procedure-colour (P-color) counter.
//
// The counter goes up by one whenever the front end sees a procedure call and
// down by one whenever it sees a return, so nested or recursive calls get
// successive colours and a callee's stack accesses are told apart from its
// caller's. This up/down behaviour is the design's procedure colouring.
// Own choices: the counter wraps modulo 2**PCOLOR_W (the width is free as
// long as it fits the unused symbolic address bits), a call and a return in
// the same cycle cancel, and reset clears it to 0.
//
// Interface: call_i / ret_i are one-cycle pulses from decode; pcolor_o is the
// colour of the current procedure. Timing: the new colour is visible in the
// cycle after the pulse.
module pcolor_counter #(
  parameter int unsigned PCOLOR_W = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                call_i,
  input  logic                ret_i,
  output logic [PCOLOR_W-1:0] pcolor_o
);
  logic [PCOLOR_W-1:0] color_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      color_q <= '0;
    end else begin
      unique case ({call_i, ret_i})
        2'b10:   color_q <= color_q + 1'b1;
        2'b01:   color_q <= color_q - 1'b1;
        default: color_q <= color_q;
      endcase
    end
  end

  assign pcolor_o = color_q;
endmodule
