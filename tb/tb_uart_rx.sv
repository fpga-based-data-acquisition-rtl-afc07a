// tb_uart_rx: self-checking test of the 8N1 receiver.
//
// The testbench plays the PC's transmitter: it sends random bytes as 8N1
// frames with the receiver's nominal bit time and with bit times 2 % fast and
// 2 % slow, back to back and with gaps. It checks every received byte, that
// out_valid comes 9.5 bit periods (plus the two-flop synchroniser) after the
// start edge, that a frame with a low stop bit gives frame_err and no byte,
// and that a low glitch shorter than half a bit is not taken as a start bit.
`timescale 1ns / 1ps
module tb_uart_rx;

  localparam int  CLK_HZ = 24_000_000;
  localparam int  BAUD   = 115_200;
  localparam int  BITC   = (CLK_HZ + BAUD / 2) / BAUD;   // 208 cycles
  localparam real TCLK   = 1.0e9 / CLK_HZ;
  localparam int  NBYTES = 60;
  localparam real NOMINAL = BITC * TCLK;   // bit time matching the receiver

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       rxd = 1'b1;
  logic       out_valid, frame_err;
  logic [7:0] out_data;

  int checks = 0, failures = 0;

  always #(TCLK / 2) clk = ~clk;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [7:0] expq[$];
  int nvalid = 0, nferr = 0;
  realtime t_start;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      automatic real lat = ($realtime - t_start) / TCLK;
      nvalid++;
      check(expq.size() > 0, "byte received that was not sent");
      if (expq.size() > 0) begin
        automatic logic [7:0] e = expq.pop_front();
        check(out_data == e, $sformatf("got %02h expected %02h", out_data, e));
      end
      // nominal: 2 sync + BITC/2 + 9*BITC cycles, up to 1 for edge alignment
      // and +/- 2 % per bit for the skewed rates
      check(lat >= (2 + BITC / 2 + 9 * BITC) * 0.975 && lat <= (4 + BITC / 2 + 9 * BITC) * 1.025,
            $sformatf("latency %0.1f cycles", lat));
    end
    if (rst_n && frame_err) nferr++;
  end

  // rate: 0 nominal, 1 two percent fast, 2 two percent slow
  task automatic bit_wait(input int rate);
    case (rate)
      1:       #(NOMINAL * 0.98);
      2:       #(NOMINAL * 1.02);
      default: #(NOMINAL);
    endcase
  endtask

  task automatic send(input logic [7:0] b, input int rate, input bit stop = 1'b1);
    t_start = $realtime;
    rxd = 1'b0;
    bit_wait(rate);
    for (int k = 0; k < 8; k++) begin
      rxd = b[k];
      bit_wait(rate);
    end
    rxd = stop;
    bit_wait(rate);
    rxd = 1'b1;
  endtask

  initial begin
    #(10 * TCLK);
    rst_n = 1'b1;
    #(20 * TCLK + 3.3);
    for (int i = 0; i < NBYTES; i++) begin
      automatic logic [7:0] b = (i == 0) ? 8'hFA : (i == 1) ? 8'h00 : (i == 2) ? 8'hFF : 8'($urandom);
      expq.push_back(b);
      send(b, i % 3);
      if (i % 4 == 0) repeat ($urandom_range(1, 5)) bit_wait(0);
    end
    #(2 * NOMINAL);
    check(nvalid == NBYTES, $sformatf("%0d of %0d bytes received", nvalid, NBYTES));
    check(expq.size() == 0, "all bytes received in order");
    // Low stop bit: frame error, no byte.
    begin
      automatic int nv = nvalid;
      send(8'h55, 0, 1'b0);
      #(3 * NOMINAL);
      check(nferr == 1, "frame error flagged for low stop bit");
      check(nvalid == nv, "no byte delivered for a framing error");
    end
    // Glitch of a quarter bit: ignored.
    begin
      automatic int nv = nvalid;
      rxd = 1'b0;
      #(NOMINAL / 4);
      rxd = 1'b1;
      #(12 * NOMINAL);
      check(nvalid == nv && nferr == 1, "short glitch ignored");
    end
    // Receiver still works afterwards.
    expq.push_back(8'hA5);
    send(8'hA5, 0);
    #(2 * NOMINAL);
    check(nvalid == NBYTES + 1 && expq.size() == 0, "byte after glitch received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TCLK * BITC * (NBYTES * 20 + 100));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
