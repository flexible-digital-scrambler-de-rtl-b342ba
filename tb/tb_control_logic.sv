// tb_control_logic: all four combinations of the counter zero flags against
// the table: A running -> CDEA, SHR, TRR; A empty and B running -> CDEB,
// SHL, TRL; both empty -> Load C.
module tb_control_logic;
  logic a_zero, b_zero, cdea, cdeb, load_c;
  scr_pkg::route_t route;
  scr_pkg::phase_e phase;
  int checks = 0, failures = 0;
  control_logic dut (.*);
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 4; i++) begin
      logic [6:0] exp, got;
      {a_zero, b_zero} = 2'(i);
      #1;
      // expected {cdea, cdeb, load_c, shr, trr, shl, trl}
      case ({a_zero, b_zero})
        2'b00, 2'b01: exp = 7'b100_1100;
        2'b10:        exp = 7'b010_0011;
        default:      exp = 7'b001_0000;
      endcase
      got = {cdea, cdeb, load_c, route.shr, route.trr, route.shl, route.trl};
      checks++;
      if (got !== exp) begin failures++; $display("FAIL a_zero=%0b b_zero=%0b got %b", a_zero, b_zero, got); end
      checks++;
      if (phase !== (exp[6] ? scr_pkg::PH_A : exp[5] ? scr_pkg::PH_B : scr_pkg::PH_LOAD)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
