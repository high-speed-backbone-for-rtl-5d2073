// ddr3_cmd_encoder: drives the DDR3 command pins from the controller's command.
//
// Each cycle the memory controller names one command; this block registers the
// matching levels of CS#, RAS#, CAS# and WE#, plus address bit A10, which tells a
// read or write with auto precharge from a plain one and "precharge all" from a
// single-bank precharge. The pin levels follow the SDRAM command table.
// On the board the chip select of the memory is tied low, so the "command
// inhibit" (CS# high) that the controller uses as its idle command never reaches
// the memory as intended. With CS_TIED_LOW set, which is the default and the
// document's fix, an inhibit request is sent as NOP (CS# low, RAS#/CAS#/WE# high)
// instead; with CS_TIED_LOW clear the block sends the inhibit as asked.
// The A10 rule is the JEDEC one; the document's table shows only the four pins.
// Timing: outputs change one clock after cmd; reset drives NOP levels.
module ddr3_cmd_encoder
  import ess_pkg::*;
#(
  parameter bit CS_TIED_LOW = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ddr3_cmd_e cmd,
  output logic      cs_n,
  output logic      ras_n,
  output logic      cas_n,
  output logic      we_n,
  output logic      a10
);

  logic [4:0] pins;   // {cs_n, ras_n, cas_n, we_n, a10}

  always_comb begin
    unique case (cmd)
      CMD_INHIBIT:       pins = CS_TIED_LOW ? 5'b0_111_0 : 5'b1_111_0;
      CMD_NOP:           pins = 5'b0_111_0;
      CMD_BURST_TERM:    pins = 5'b0_110_0;
      CMD_READ:          pins = 5'b0_101_0;
      CMD_READ_AP:       pins = 5'b0_101_1;
      CMD_WRITE:         pins = 5'b0_100_0;
      CMD_WRITE_AP:      pins = 5'b0_100_1;
      CMD_ACTIVATE:      pins = 5'b0_011_0;
      CMD_PRECHARGE:     pins = 5'b0_010_0;
      CMD_PRECHARGE_ALL: pins = 5'b0_010_1;
      CMD_REFRESH:       pins = 5'b0_001_0;
      CMD_LOAD_MODE:     pins = 5'b0_000_0;
      default:           pins = 5'b0_111_0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) {cs_n, ras_n, cas_n, we_n, a10} <= 5'b0_111_0;
    else        {cs_n, ras_n, cas_n, we_n, a10} <= pins;
  end

endmodule
