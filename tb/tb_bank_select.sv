// tb_bank_select: exhaustive check of the bank-enable gating.  For every
// combination of the three enables and the two address bits it compares the
// outputs with the rule "only the addressed half gets WL_EN, only the
// addressed side gets the write and sense enables".
`timescale 1ps/1ps
module tb_bank_select;
  logic wl_en, write_en, sense_en, bot, side;
  logic wl_en_top, wl_en_bot;
  logic [1:0] we, sae;
  int checks = 0, failures = 0;

  bank_select dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [5:0] got, exp;
      {wl_en, write_en, sense_en, bot, side} = 5'(v);
      #10;
      got = {wl_en_top, wl_en_bot, we, sae};
      exp[5]   = wl_en && !bot;
      exp[4]   = wl_en && bot;
      exp[3:2] = write_en ? (side ? 2'b10 : 2'b01) : 2'b00;
      exp[1:0] = sense_en ? (side ? 2'b10 : 2'b01) : 2'b00;
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL in=%b got=%b expected %b", 5'(v), got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
