// niugap_async_fifo_tb: writes 500 random words at 100 MHz with random req
// gaps, reads them at 46.7 MHz with random ack gaps, and checks order and
// values; checks that the FIFO fills (w_ack low) under a stalled reader and
// that r_req is low while it is empty after reset.
`timescale 1ns/1ps
module niugap_async_fifo_tb;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5    wclk = ~wclk;
  always #10.7 rclk = ~rclk;
  logic        w_req, w_ack, r_req, r_ack;
  logic [15:0] w_data, r_data;
  niugap_async_fifo dut (.*);

  localparam int N = 500;
  logic [15:0] data [N];
  int checks = 0, failures = 0, nw = 0, nr = 0, n_full = 0;
  bit stall = 1;

  initial begin
    for (int i = 0; i < N; i++) data[i] = 16'($urandom);
    w_req = 0; w_data = '0;
    #50 wrst_n = 1; rrst_n = 1;
  end
  always @(posedge wclk) begin
    if (wrst_n) begin
      if (w_req && w_ack) nw++;
      if (w_req && !w_ack) n_full++;
      w_req  <= (nw < N) && ($urandom_range(3) != 0);
      w_data <= data[nw % N];
    end
  end

  initial begin
    r_ack = 0;
    #60;
    @(posedge rclk); #1;
    checks++; if (r_req) begin failures++; $display("FAIL r_req while empty"); end
    repeat (40) @(posedge rclk);  // let the writer fill the FIFO
    stall = 0;
    while (nr < N) begin
      @(posedge rclk);
      if (r_req && r_ack) begin
        checks++;
        if (r_data !== data[nr]) begin failures++; $display("FAIL word %0d: %h expected %h", nr, r_data, data[nr]); end
        nr++;
      end
      #1 r_ack = $urandom_range(2) != 0;
    end
    checks++; if (n_full == 0) begin failures++; $display("FAIL FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
