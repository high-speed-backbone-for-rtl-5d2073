// tb_ddr3_cmd_encoder: checks every command's pin levels against the SDRAM command
// table, for the board variant (chip select tied low: inhibit sent as NOP) and for
// the plain variant (inhibit sent with CS# high), and the one-cycle output delay.
module tb_ddr3_cmd_encoder;
  import ess_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ddr3_cmd_e cmd = CMD_NOP;
  logic cs_a, ras_a, cas_a, we_a, a10_a;
  logic cs_b, ras_b, cas_b, we_b, a10_b;

  ddr3_cmd_encoder dut_board (.clk, .rst_n, .cmd,
    .cs_n(cs_a), .ras_n(ras_a), .cas_n(cas_a), .we_n(we_a), .a10(a10_a));
  ddr3_cmd_encoder #(.CS_TIED_LOW(1'b0)) dut_plain (.clk, .rst_n, .cmd,
    .cs_n(cs_b), .ras_n(ras_b), .cas_n(cas_b), .we_n(we_b), .a10(a10_b));

  // expected {cs, ras, cas, we, a10} from the command table
  function automatic logic [4:0] expected(ddr3_cmd_e c, bit tied);
    case (c)
      CMD_INHIBIT:       return tied ? 5'b01110 : 5'b11110;
      CMD_NOP:           return 5'b01110;
      CMD_BURST_TERM:    return 5'b01100;
      CMD_READ:          return 5'b01010;
      CMD_READ_AP:       return 5'b01011;
      CMD_WRITE:         return 5'b01000;
      CMD_WRITE_AP:      return 5'b01001;
      CMD_ACTIVATE:      return 5'b00110;
      CMD_PRECHARGE:     return 5'b00100;
      CMD_PRECHARGE_ALL: return 5'b00101;
      CMD_REFRESH:       return 5'b00010;
      CMD_LOAD_MODE:     return 5'b00000;
      default:           return 5'b01110;
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 12; i++) begin
      ddr3_cmd_e c;
      c = ddr3_cmd_e'(i);
      @(negedge clk) cmd = c;
      #1;
      checks++;
      if ({cs_a, ras_a, cas_a, we_a, a10_a} == expected(c, 1'b1) && c != CMD_NOP && c != CMD_INHIBIT) begin
        failures++;
        $display("FAIL: output changed before the clock edge for %s", c.name());
      end
      @(posedge clk); #1;
      checks += 2;
      if ({cs_a, ras_a, cas_a, we_a, a10_a} != expected(c, 1'b1)) begin
        failures++; $display("FAIL: board variant %s -> %b", c.name(), {cs_a, ras_a, cas_a, we_a, a10_a});
      end
      if ({cs_b, ras_b, cas_b, we_b, a10_b} != expected(c, 1'b0)) begin
        failures++; $display("FAIL: plain variant %s -> %b", c.name(), {cs_b, ras_b, cas_b, we_b, a10_b});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
