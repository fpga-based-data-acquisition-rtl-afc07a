// tb_uart_tx: self-checking test of the 8N1 transmitter.
//
// Random bytes are offered on the valid/ready input, some back to back and
// some after idle gaps. An independent receiver in the testbench finds each
// start bit on txd, samples the middle of every bit and checks the start bit,
// the eight data bits (LSB first) and the stop bit. It also checks that each
// bit lasts exactly CLK_HZ/BAUD cycles, that a frame lasts ten bits, that
// ready stays low during a frame and that the line idles high.
`timescale 1ns / 1ps
module tb_uart_tx;

  localparam int CLK_HZ = 24_000_000;
  localparam int BAUD   = 115_200;
  localparam int BITC   = (CLK_HZ + BAUD / 2) / BAUD;   // 208
  localparam int NBYTES = 40;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_ready;
  logic [7:0] in_data = '0;
  logic       txd;

  int checks = 0, failures = 0;

  always #20.833 clk = ~clk;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [7:0] sent[$];
  int         nrx = 0;

  // Reference receiver: counts clock cycles from the start edge. The
  // testbench drives and samples on the falling clock edge, away from the
  // rising edge on which the transmitter changes.
  initial begin
    @(posedge rst_n);
    forever begin
      automatic logic [7:0] b;
      automatic int t;
      @(negedge clk);
      if (txd == 1'b0) begin
        // start edge seen on this cycle; sample bit k at (k + 0.5) * BITC
        repeat (BITC / 2 - 1) @(negedge clk);
        check(txd == 1'b0, "start bit low at mid-bit");
        check(!in_ready, "ready low during frame");
        for (int k = 0; k < 8; k++) begin
          repeat (BITC) @(negedge clk);
          b[k] = txd;
        end
        repeat (BITC) @(negedge clk);
        check(txd == 1'b1, "stop bit high");
        // stop bit ends BITC/2 later (give or take one cycle) and ready rises
        t = 0;
        while (!in_ready && t < BITC) begin
          @(negedge clk);
          t++;
        end
        check(t >= BITC / 2 - 1 && t <= BITC / 2 + 1,
              $sformatf("stop bit length: ready after %0d cycles", t));
        check(sent.size() > 0, "frame without a byte offered");
        if (sent.size() > 0) begin
          automatic logic [7:0] e = sent.pop_front();
          check(b == e, $sformatf("received %02h expected %02h", b, e));
        end
        nrx++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check(txd == 1'b1 && in_ready, "idle line high and ready");
    for (int i = 0; i < NBYTES; i++) begin
      while (!in_ready) @(negedge clk);
      in_data  = (i == 0) ? 8'h01 : (i == 1) ? 8'hFA : 8'($urandom);
      in_valid = 1'b1;
      @(negedge clk);   // accepted on the rising edge: ready was high before it
      sent.push_back(in_data);
      if (i == 0) begin
        // exact start-bit duration: txd low from the next cycle for BITC cycles
        automatic int w = 1;
        in_valid = 1'b0;
        @(negedge clk);
        while (txd == 1'b0) begin
          @(negedge clk);
          w++;
        end
        check(w == BITC, $sformatf("start bit lasted %0d cycles, expected %0d", w, BITC));
      end
      in_valid = 1'b0;
      if (i % 3 == 0) repeat ($urandom_range(1, 400)) @(negedge clk);
    end
    wait (nrx == NBYTES);
    repeat (BITC) @(negedge clk);
    check(txd == 1'b1, "line idle high at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(41.667 * (NBYTES * 12 * BITC + 20_000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
