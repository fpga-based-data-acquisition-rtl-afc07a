// tb_sample_fifo: self-checking test of the sample FIFO at its full depth.
//
// A queue in the testbench is the reference. Random pushes and pops, with
// phases biased towards filling and towards draining, take the FIFO through
// empty, full, simultaneous push and pop, pops while empty (ignored) and
// pushes while full (dropped, overflow pulse). After every cycle count, empty
// and full are compared with the reference, and every popped word is compared
// one cycle after the pop (registered read).
`timescale 1ns / 1ps
module tb_sample_fifo;

  localparam int DEPTH = 1024;
  localparam int CW    = $clog2(DEPTH + 1);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          wr_en = 1'b0, rd_en = 1'b0;
  logic [7:0]    wr_data = '0, rd_data;
  logic          empty, full, overflow;
  logic [CW-1:0] count;

  int checks = 0, failures = 0;
  int n_full = 0, n_empty_pop = 0, n_overflow = 0, n_both = 0;

  always #5 clk = ~clk;

  sample_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [7:0] ref_q[$];
  logic [7:0] exp_rd;
  bit         exp_rd_valid = 0, exp_ovf = 0;

  task automatic step(input int p_wr, input int p_rd);
    // drive on the falling edge, act on the rising edge, check after it
    wr_en   = ($urandom_range(0, 99) < p_wr);
    rd_en   = ($urandom_range(0, 99) < p_rd);
    wr_data = 8'($urandom);
    if (wr_en && rd_en && ref_q.size() != 0 && ref_q.size() != DEPTH) n_both++;
    if (rd_en && ref_q.size() == 0) n_empty_pop++;
    exp_ovf = wr_en && ref_q.size() == DEPTH;
    if (exp_ovf) n_overflow++;
    exp_rd_valid = rd_en && ref_q.size() != 0;
    if (exp_rd_valid) exp_rd = ref_q.pop_front();
    // push uses the occupancy before this cycle's pop
    if (wr_en && (ref_q.size() + (exp_rd_valid ? 1 : 0)) < DEPTH) ref_q.push_back(wr_data);
    @(negedge clk);
    check(count == CW'(ref_q.size()), $sformatf("count %0d expected %0d", count, ref_q.size()));
    check(empty == (ref_q.size() == 0), "empty flag");
    check(full == (ref_q.size() == DEPTH), "full flag");
    check(overflow == exp_ovf, "overflow pulse");
    if (exp_rd_valid) check(rd_data == exp_rd, $sformatf("read %02h expected %02h", rd_data, exp_rd));
    if (full) n_full++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    for (int phase = 0; phase < 8; phase++) begin
      // fill-biased, then drain-biased, then balanced
      repeat (3000) step(85, 15);
      repeat (3000) step(15, 85);
      repeat (1000) step(50, 50);
    end
    wr_en = 1'b0;
    rd_en = 1'b0;
    check(n_full > 0 && n_overflow > 0 && n_empty_pop > 0 && n_both > 0,
          $sformatf("corner cases reached: full %0d overflow %0d empty-pop %0d both %0d",
                    n_full, n_overflow, n_empty_pop, n_both));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 200_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
