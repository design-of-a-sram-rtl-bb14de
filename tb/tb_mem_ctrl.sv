// tb_mem_ctrl: checks the pulse sequence of the controller cycle by cycle.
//
// The delay chain is replaced by an ideal 120 ps delay from PCHB to the
// feedback input.  A random mix of one-period writes and two-period reads is
// issued, inputs changing 50 ps after the rising edge.  In every period the
// outputs are sampled at 60, 300 and 700 ps and compared with the expected
// levels for a write period, the first period of a read and the second period
// of a read.  The precharge pulse width (120 ps), the one-period write and
// the two-period read are checked, as is that precharge and word line
// enable are never high together.
`timescale 1ps/1ps
module tb_mem_ctrl;
  localparam int unsigned TCK = 1000;
  localparam int unsigned DLY = 120;

  logic clk = 1'b1, rst, rw;
  logic pch_fb, pch_en, pchb, wl_en, sense_en, write_en;
  int checks = 0, failures = 0;
  int n_pch = 0, n_write = 0, n_read = 0;

  mem_ctrl dut (.*);

  assign #(DLY) pch_fb = pchb;

  always #(TCK/2) clk = ~clk;

  initial begin
    #(TCK * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // precharge pulse width and overlap with the word line enable
  time t_rise;
  always @(posedge pch_en) begin
    t_rise = $time;
    n_pch++;
  end
  always @(negedge pch_en) begin
    checks++;
    if ($time - t_rise != DLY) begin
      failures++;
      $display("FAIL precharge pulse %0t ps wide at %0t", $time - t_rise, $time);
    end
  end

  typedef enum {CYC_W, CYC_R1, CYC_R2} cyc_e;

  task automatic expect_lv(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: {pch,wl,we,se}=%b expected %b", what, $time, got, exp);
    end
  endtask

  // one period, starting at a rising edge
  task automatic period(cyc_e c, logic rw_v);
    #50 rw = rw_v;
    #10;
    case (c)
      CYC_R2:  expect_lv("R2 early", {pch_en, wl_en, write_en, sense_en}, 4'b0100);
      default: expect_lv("precharge", {pch_en, wl_en, write_en, sense_en}, 4'b1000);
    endcase
    #240;
    case (c)
      CYC_W:   expect_lv("W word line", {pch_en, wl_en, write_en, sense_en}, 4'b0110);
      CYC_R1:  expect_lv("R1 word line", {pch_en, wl_en, write_en, sense_en}, 4'b0100);
      CYC_R2:  expect_lv("R2 mid", {pch_en, wl_en, write_en, sense_en}, 4'b0100);
    endcase
    #400;
    case (c)
      CYC_W:   expect_lv("W late", {pch_en, wl_en, write_en, sense_en}, 4'b0110);
      CYC_R1:  expect_lv("R1 sensing", {pch_en, wl_en, write_en, sense_en}, 4'b0101);
      CYC_R2:  expect_lv("R2 late", {pch_en, wl_en, write_en, sense_en}, 4'b0100);
    endcase
    @(posedge clk);
  endtask

  initial begin
    rst = 1'b1; rw = 1'b0;
    repeat (3) @(posedge clk);
    #50 rst = 1'b0;
    checks++;
    if (pch_en || wl_en || sense_en || write_en) begin
      failures++;
      $display("FAIL reset did not clear the controls");
    end
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      if ($urandom_range(1, 0) == 0) begin
        period(CYC_W, 1'b0);
        n_write++;
      end else begin
        period(CYC_R1, 1'b1);
        period(CYC_R2, 1'b1);
        n_read++;
      end
    end
    checks++;
    if (n_pch != n_write + n_read) begin
      failures++;
      $display("FAIL %0d precharge pulses for %0d accesses", n_pch, n_write + n_read);
    end
    checks++;
    if (n_write == 0 || n_read == 0) begin
      failures++;
      $display("FAIL writes=%0d reads=%0d", n_write, n_read);
    end
    $display("writes=%0d reads=%0d precharges=%0d", n_write, n_read, n_pch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
