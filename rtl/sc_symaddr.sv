// sc_symaddr: forms the symbolic address of a load or store from its syntax.
//
// The displacement fills bits 15:0 and the base register ID bits 20:16. When
// the base register is the stack pointer, the current P-color is placed in
// the bits above the base register ID (from bit 21), so that equal stack
// offsets in different procedure activations map to different symbolic
// addresses; accesses through any other base register leave those bits 0 so
// that global data stays shared between procedures. The remaining upper bits
// are 0. This layout follows the design; only the use of 0 for the unused
// bits is an own choice.
//
// Interface: base_id_i, disp_i and pcolor_i in, sym_o and is_stack_o out.
// Purely combinational.
module sc_symaddr
  import sc_pkg::*;
#(
  parameter int unsigned PCOLOR_W = 6
) (
  input  logic [REGID_W-1:0]  base_id_i,
  input  logic [DISP_W-1:0]   disp_i,
  input  logic [PCOLOR_W-1:0] pcolor_i,
  output sym_addr_t           sym_o,
  output logic                is_stack_o
);
  if (PCOLOR_LSB + PCOLOR_W > SYM_W) begin : g_bad_width
    $error("P-color does not fit in the symbolic address");
  end

  always_comb begin
    is_stack_o = (base_id_i == SP_REG_ID);
    sym_o      = '0;
    sym_o[DISP_W-1:0]                 = disp_i;
    sym_o[BASE_LSB +: REGID_W]        = base_id_i;
    sym_o[PCOLOR_LSB +: PCOLOR_W]     = is_stack_o ? pcolor_i : '0;
  end
endmodule
