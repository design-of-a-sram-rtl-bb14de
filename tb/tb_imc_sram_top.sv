// tb_imc_sram_top: end-to-end test of the full butterfly SRAM at its default
// size, as a host loading a set of weights and reading them back.
//
//   1. Reset, then the short sequence of the document's read/write test:
//      write 0x01 to 0x00 and read it back at once, write 0x04 to 0x02 and
//      0x06 to 0x04, read both back.
//   2. Load all 128 words with random bytes, one write per clock period.
//   3. Read all 128 words, one read every two periods.
//   4. A random mix of writes and reads.
// Every read result is compared with a shadow copy of the memory, both in the
// first period (valid once the sense amplifiers have fired) and at the end of
// the second period (held by the read latches).  In every period the
// controls are sampled: precharge high and word line enable low early in a
// write or first read period, word line enable high afterwards, no precharge
// in the second read period, and exactly the addressed word line of the
// addressed half raised, and every precharge pulse is 120 ps wide (four
// inverters of 30 ps).  Each mechanism is counted: precharge pulses,
// accesses to each of the four banks, both column-multiplexer settings, the
// read latch holding after the sense enable has dropped and the second read
// period without precharge; one that never happens counts as a failure.
`timescale 1ps/1ps
module tb_imc_sram_top;
  import imc_sram_pkg::*;

  localparam int unsigned TCK = 1000;   // 1 ns clock, as in the document
  localparam int unsigned WORDS = 1 << ADDR_W;

  logic clk = 1'b1, rst, rw;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] data_i, data_o;
  logic data_oe, pch_en, wl_en, write_en, sense_en;
  logic [ROWS-1:0] wlt_o, wlb_o;

  imc_sram_top dut (.*);

  always #(TCK/2) clk = ~clk;

  int checks = 0, failures = 0;
  int n_pch = 0, n_bank_wr [4], n_bank_rd [4], n_col [2], n_hold = 0, n_r2 = 0, n_rst = 0;
  int n_cycles = 0;
  logic [DATA_W-1:0] shadow [WORDS];
  logic              valid  [WORDS];

  // precharge pulse: four inverters of 30 ps
  time t_pch;
  always @(posedge pch_en) begin
    n_pch++;
    t_pch = $time;
  end
  always @(negedge pch_en) begin
    checks++;
    if ($time - t_pch != 120) begin
      failures++;
      $display("FAIL precharge pulse %0t ps wide", $time - t_pch);
    end
  end
  always @(posedge clk) n_cycles++;

  initial begin
    #(TCK * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  function automatic logic [2*ROWS-1:0] exp_wl(logic [ADDR_W-1:0] ad);
    addr_t f;
    f = addr_t'(ad);
    return f.bot ? {(ROWS)'(1) << f.row, (ROWS)'(0)} : {(ROWS)'(0), (ROWS)'(1) << f.row};
  endfunction

  // All tasks start at a rising edge and end at the next free rising edge.
  task automatic do_write(logic [ADDR_W-1:0] ad, logic [DATA_W-1:0] d);
    int c0;
    c0 = n_cycles;
    #50 rw = 1'b0; addr = ad; data_i = d;
    #10 check("write: precharge first", {pch_en, wl_en, write_en}, 3'b100);
    #240 check("write: word line and write driver", {pch_en, wl_en, write_en}, 3'b011);
    check("write: addressed word line", {wlb_o, wlt_o}, exp_wl(ad));
    @(posedge clk);
    check("write takes one period", n_cycles - c0, 1);
    shadow[ad] = d;
    valid[ad]  = 1'b1;
    n_bank_wr[ad[6:5]]++;
    n_col[ad[4]]++;
  endtask

  task automatic do_read(logic [ADDR_W-1:0] ad);
    int c0;
    c0 = n_cycles;
    #50 rw = 1'b1; addr = ad; data_i = $urandom;
    #10 check("read: precharge first", {pch_en, wl_en, sense_en}, 3'b100);
    #240 check("read: word line", {pch_en, wl_en, sense_en}, 3'b010);
    check("read: addressed word line", {wlb_o, wlt_o}, exp_wl(ad));
    #400 check("read: sensing", {pch_en, wl_en, sense_en, data_oe}, 4'b0111);
    if (valid[ad]) check($sformatf("read %02h in first period", ad), data_o, shadow[ad]);
    @(posedge clk);
    #60 check("read: second period has no precharge", {pch_en, wl_en, sense_en}, 3'b010);
    n_r2++;
    #880;
    if (valid[ad]) begin
      check($sformatf("read %02h held to the end", ad), data_o, shadow[ad]);
      n_hold++;
    end
    @(posedge clk);
    check("read takes two periods", n_cycles - c0, 2);
    n_bank_rd[ad[6:5]]++;
    n_col[ad[4]]++;
  endtask

  task automatic count_check(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    int p0;
    rst = 1'b1; rw = 1'b0; addr = '0; data_i = '0;
    foreach (valid[i]) valid[i] = 1'b0;
    foreach (n_bank_wr[i]) begin n_bank_wr[i] = 0; n_bank_rd[i] = 0; end
    n_col[0] = 0; n_col[1] = 0;
    repeat (3) @(posedge clk);
    check("reset clears controls", {pch_en, wl_en, write_en, sense_en}, 4'b0000);
    n_rst++;
    #50 rst = 1'b0;
    @(posedge clk);

    // 1. the document's short test
    do_write(7'h00, 8'h01);
    do_read(7'h00);
    do_write(7'h02, 8'h04);
    do_write(7'h04, 8'h06);
    do_read(7'h00);
    do_read(7'h02);
    do_read(7'h04);

    // 2. load every word, one per period
    p0 = n_cycles;
    for (int a = 0; a < WORDS; a++) do_write(ADDR_W'(a), DATA_W'($urandom));
    check("full load in 128 periods", n_cycles - p0, WORDS);

    // 3. read every word back, one per two periods
    p0 = n_cycles;
    for (int a = 0; a < WORDS; a++) do_read(ADDR_W'(a));
    check("full read-back in 256 periods", n_cycles - p0, 2 * WORDS);

    // 4. random mix
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(1, 0) == 0) do_write(ADDR_W'($urandom), DATA_W'($urandom));
      else                           do_read(ADDR_W'($urandom));
    end

    count_check("precharge pulse", n_pch);
    for (int b = 0; b < 4; b++) begin
      count_check($sformatf("write to bank %0d", b), n_bank_wr[b]);
      count_check($sformatf("read from bank %0d", b), n_bank_rd[b]);
    end
    count_check("column select 0", n_col[0]);
    count_check("column select 1", n_col[1]);
    count_check("read latch hold", n_hold);
    count_check("second read period", n_r2);
    count_check("reset", n_rst);
    $display("precharges=%0d bank writes=%0d/%0d/%0d/%0d bank reads=%0d/%0d/%0d/%0d holds=%0d",
             n_pch, n_bank_wr[0], n_bank_wr[1], n_bank_wr[2], n_bank_wr[3],
             n_bank_rd[0], n_bank_rd[1], n_bank_rd[2], n_bank_rd[3], n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
