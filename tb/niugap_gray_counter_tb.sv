// niugap_gray_counter_tb: runs a 4-bit counter through two full cycles and
// compares it with the printed 4-bit Gray table, checks that Enable = 0 holds
// the count and Clear returns it to 0, and runs the default 12-bit counter
// through 4096 + 3 steps checking one bit change per step, at_last on the
// last code and the roll-over to 0.
`timescale 1ns/1ps
module niugap_gray_counter_tb;
  logic clk = 0, clear_n = 0, en4 = 0, en12 = 0;
  always #5 clk = ~clk;
  logic [3:0]  g4;
  logic [11:0] g12, prev;
  logic        last4, last12;
  niugap_gray_counter #(.W(4)) u4  (.clk, .clear_n, .enable(en4),  .gray(g4),  .at_last(last4));
  niugap_gray_counter          u12 (.clk, .clear_n, .enable(en12), .gray(g12), .at_last(last12));

  int checks = 0, failures = 0;
  logic [3:0] table4 [16] = '{4'b0000, 4'b0001, 4'b0011, 4'b0010, 4'b0110, 4'b0111,
                              4'b0101, 4'b0100, 4'b1100, 4'b1101, 4'b1111, 4'b1110,
                              4'b1010, 4'b1011, 4'b1001, 4'b1000};
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 clear_n = 1;
    chk(g4 == 4'b0000 && g12 == 12'h000, "cleared to 0");
    en4 = 1;
    for (int i = 1; i <= 32; i++) begin
      @(posedge clk); #1;
      chk(g4 == table4[i % 16], $sformatf("4-bit step %0d: %b", i, g4));
      chk(last4 == (i % 16 == 15), $sformatf("4-bit at_last step %0d", i));
    end
    en4 = 0;
    repeat (3) begin @(posedge clk); #1; chk(g4 == table4[0], "hold with Enable = 0"); end
    en4 = 1; repeat (5) @(posedge clk); #1 en4 = 0;
    chk(g4 == table4[5], "count after hold");
    clear_n = 0; #1;
    chk(g4 == 4'b0000, "asynchronous clear");
    #2 clear_n = 1;
    en12 = 1;
    for (int i = 1; i <= 4099; i++) begin
      prev = g12;
      @(posedge clk); #1;
      chk($countones(g12 ^ prev) == 1, $sformatf("12-bit step %0d", i));
      if (i % 4096 == 4095) chk(last12 && g12 == 12'h800, "12-bit last code 100..0");
      if (i == 4096) chk(g12 == 12'h000, "12-bit roll-over to 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
