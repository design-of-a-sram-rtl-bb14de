// tb_pch_delay_chain: checks that the four-inverter chain passes its input
// through uninverted and exactly 4 x 30 ps later, for both edges and for a
// pulse shorter than the chain delay.
`timescale 1ps/1ps
module tb_pch_delay_chain;
  localparam int unsigned DLY = 4 * 30;
  logic a, y;
  int checks = 0, failures = 0;

  pch_delay_chain #(.N_INV(4), .INV_DELAY_PS(30)) dut (.a(a), .y(y));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b1;
    #500;
    check("settled high", y, 1'b1);
    for (int i = 0; i < 4; i++) begin
      logic v;
      v = ~a;
      a = v;
      #(DLY - 1);
      check("not yet changed", y, ~v);
      #2;
      check("changed after chain delay", y, v);
      #300;
    end
    // a 50 ps pulse comes out 50 ps wide, 120 ps later
    a = 1'b0; #50; a = 1'b1;
    #(DLY - 50 + 10);
    check("short pulse arrives", y, 1'b0);
    #50;
    check("short pulse ends", y, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
