// tb_sram_bank: drives one bank model directly with precharge, word line,
// write-driver and sense pulses in the order the controller produces them.
// Random bytes are written to random (row, column-select) words and checked
// against a shadow copy by reading every word back; a read without a
// precharge before it and a read with the sense amplifiers off are checked to
// return nothing.
`timescale 1ps/1ps
module tb_sram_bank;
  localparam int unsigned ROWS = 16, W = 8;
  logic [ROWS-1:0] wl;
  logic            pchb, we, sae;
  logic [0:0]      col;
  logic [W-1:0]    din, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] shadow [ROWS][2];

  sram_bank #(.ROWS(ROWS), .W(W), .COL_MUX(2)) dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic precharge();
    pchb = 1'b0; #100; pchb = 1'b1; #20;
  endtask

  task automatic write_word(int r, int c, logic [W-1:0] d);
    col = c[0]; din = d;
    precharge();
    wl = ROWS'(1) << r; we = 1'b1; #200;
    we = 1'b0; wl = '0; #20;
    shadow[r][c] = d;
  endtask

  task automatic read_word(int r, int c, output logic [W-1:0] q, input bit do_pch = 1);
    col = c[0];
    if (do_pch) precharge();
    wl = ROWS'(1) << r; #100;
    sae = 1'b1; #100;
    q = dout;
    sae = 1'b0; #10;
    wl = '0; #20;
  endtask

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] q;
    wl = '0; pchb = 1'b1; we = 1'b0; sae = 1'b0; col = '0; din = '0;
    #100;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < 2; c++)
        write_word(r, c, W'($urandom));
    for (int i = 0; i < 200; i++)
      write_word($urandom_range(ROWS-1, 0), $urandom_range(1, 0), W'($urandom));
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < 2; c++) begin
        read_word(r, c, q);
        check($sformatf("read row %0d col %0d", r, c), q, shadow[r][c]);
      end
    // both words of a row differ and stay apart
    write_word(3, 0, 8'hA5);
    write_word(3, 1, 8'h3C);
    read_word(3, 0, q); check("column 0 kept", q, 8'hA5);
    read_word(3, 1, q); check("column 1 kept", q, 8'h3C);
    // reading 0x00 discharges every BL; without a precharge the next read sees nothing
    write_word(5, 0, 8'h00);
    write_word(6, 0, 8'hFF);
    read_word(5, 0, q); check("zero word", q, 8'h00);
    read_word(6, 0, q, 0); check("no precharge gives no data", q, 8'h00);
    read_word(6, 0, q); check("with precharge", q, 8'hFF);
    // sense amplifiers off: output low
    precharge(); wl = ROWS'(1) << 6; #100;
    check("sense off", dout, 8'h00);
    wl = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
