// tb_data_latches: checks that the write latches follow the bus while RW is
// low and hold once RW rises, that the read latches follow the sense
// amplifiers only while RW and SENSE_EN are both high and hold otherwise,
// and that the bus is driven outward exactly while RW is high.
`timescale 1ps/1ps
module tb_data_latches;
  localparam int unsigned W = 8;
  logic         rw, sense_en, data_oe;
  logic [W-1:0] data_i, rd, wr, data_o;
  int checks = 0, failures = 0;

  data_latches #(.W(W)) dut (.*);

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    logic [W-1:0] held_wr, held_rd;
    // Load the read latch once so that it holds a known value.
    rw = 1; sense_en = 1; rd = 8'h5a; data_i = 8'h00; #10;
    check("read latch transparent", data_o, 8'h5a);
    held_rd = 8'h5a;
    sense_en = 0; #10;
    for (int i = 0; i < 40; i++) begin
      // write phase: transparent write latch
      rw = 0; sense_en = 0;
      data_i = 8'($urandom); rd = 8'($urandom); #10;
      check("write latch follows bus", wr, data_i);
      check("read latch holds during write", data_o, held_rd);
      check("bus not driven during write", 8'(data_oe), 8'h00);
      // sense enable alone must not open the read latch while RW is low
      sense_en = 1; rd = 8'($urandom); #10;
      check("read latch closed while RW low", data_o, held_rd);
      held_wr = data_i;
      // read phase
      sense_en = 0; rw = 1; #10;
      data_i = 8'($urandom); #10;
      check("write latch holds while RW high", wr, held_wr);
      check("bus driven during read", 8'(data_oe), 8'h01);
      check("read latch closed before sensing", data_o, held_rd);
      sense_en = 1; rd = 8'($urandom); #10;
      check("read latch transparent while sensing", data_o, rd);
      held_rd = rd;
      sense_en = 0; #10;
      rd = 8'($urandom); #10;
      check("read latch holds after sensing", data_o, held_rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
