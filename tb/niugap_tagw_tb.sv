// niugap_tagw_tb: runs the NIUGAP end to end with four tag field sizes, a
// 3-bit time tag plus a 4, 8, 10 or 12-bit sequence tag (7, 11, 13 and 15
// tag bits in all). Each size runs in its own niugap_tagw_bench; the results
// are summed, and a size that never retransmits or never advances its time
// tag counts as a failure, as does a 7-bit run whose tag never wraps.
`timescale 1ns/1ps
module niugap_tagw_tb;
  localparam int NB = 4;

  logic done [NB];
  int   c [NB], f [NB], nr [NB], nt [NB], nw [NB];

  niugap_tagw_bench #(.TIME_W(3), .SEQ_W(4))  b7  (.done(done[0]), .checks(c[0]), .failures(f[0]), .n_retrans(nr[0]), .n_time(nt[0]), .n_wrap(nw[0]));
  niugap_tagw_bench #(.TIME_W(3), .SEQ_W(8))  b11 (.done(done[1]), .checks(c[1]), .failures(f[1]), .n_retrans(nr[1]), .n_time(nt[1]), .n_wrap(nw[1]));
  niugap_tagw_bench #(.TIME_W(3), .SEQ_W(10)) b13 (.done(done[2]), .checks(c[2]), .failures(f[2]), .n_retrans(nr[2]), .n_time(nt[2]), .n_wrap(nw[2]));
  niugap_tagw_bench #(.TIME_W(3), .SEQ_W(12)) b15 (.done(done[3]), .checks(c[3]), .failures(f[3]), .n_retrans(nr[3]), .n_time(nt[3]), .n_wrap(nw[3]));

  task automatic report(int extra_fail);
    int checks, failures;
    checks = 0; failures = extra_fail;
    for (int i = 0; i < NB; i++) begin
      $display("tag bits %0d: checks=%0d failures=%0d retrans=%0d time_adv=%0d wraps=%0d done=%0d",
               (i == 0) ? 7 : (i == 1) ? 11 : (i == 2) ? 13 : 15, c[i], f[i], nr[i], nt[i], nw[i], done[i]);
      checks += c[i] + 2;
      failures += f[i];
      if (nr[i] == 0) failures++;
      if (nt[i] == 0) failures++;
    end
    checks++;
    if (nw[0] == 0) begin
      failures++;
      $display("FAIL the 7-bit tag never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3]);
    report(0);
    $finish;
  end

  initial begin
    #8ms;
    $display("FAIL watchdog");
    report(1);
    $finish;
  end
endmodule
