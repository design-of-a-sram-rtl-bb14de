// tb_row_decoder: exhaustive check of the 16-line AND-gate row decoder.
// Every address with WL_EN low and high is applied; the expected word lines
// are a one-hot vector built by shifting, or all zero while WL_EN is low.
`timescale 1ps/1ps
module tb_row_decoder;
  localparam int unsigned AW = 4;
  logic [AW-1:0]      a;
  logic               wl_en;
  logic [(1<<AW)-1:0] wl;
  int checks = 0, failures = 0;

  row_decoder #(.AW(AW)) dut (.a(a), .wl_en(wl_en), .wl(wl));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int en = 0; en < 2; en++)
      for (int i = 0; i < (1 << AW); i++) begin
        logic [(1<<AW)-1:0] exp;
        a = AW'(i);
        wl_en = en[0];
        #10;
        exp = en[0] ? ((1 << AW)'(1) << i) : '0;
        checks++;
        if (wl !== exp) begin
          failures++;
          $display("FAIL a=%0d wl_en=%0d wl=%b expected %b", i, en, wl, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
