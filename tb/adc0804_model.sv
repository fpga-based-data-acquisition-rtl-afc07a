// adc0804_model: behavioural model of the ADC0804's digital bus, for
// simulation only (not synthesizable; kind: behavioural model).
//
// A low pulse on WR resets INTR high and starts a conversion of the code on
// `vin` (the analog input, already expressed as the 0..255 code it converts
// to) when WR rises. CONV_NS later the result is latched and INTR falls.
// A falling RD resets INTR high; TACC_NS after RD falls the result appears on
// DB, and while RD is high DB carries a junk pattern (the inverted result) so
// that a reader sampling outside the RD window is caught. CS is taken as tied
// low. The model counts conversions and timing violations: a WR pulse shorter
// than TWR_NS, RD while a conversion runs, WR while RD is low.
`timescale 1ns / 1ps
module adc0804_model #(
  parameter real CONV_NS = 100_000.0,
  parameter real TACC_NS = 135.0,
  parameter real TWR_NS  = 100.0
) (
  input  logic       wr_n,
  input  logic       rd_n,
  output logic       intr_n,
  output logic [7:0] db,
  input  logic [7:0] vin,
  output logic [7:0] last_code,
  output int         conv_count,
  output int         violations
);

  logic  converting = 1'b0;
  logic  drive      = 1'b0;
  logic  wr_armed   = 1'b0;   // a WR falling edge has been seen
  realtime wr_fall;
  int    conv_id    = 0;

  initial begin
    intr_n     = 1'b1;
    last_code  = 8'h00;
    conv_count = 0;
    violations = 0;
  end

  assign db = drive ? last_code : ~last_code;

  always @(negedge wr_n) begin
    wr_fall  = $realtime;
    wr_armed = 1'b1;
    intr_n  = 1'b1;
    if (!rd_n) violations++;
  end

  always @(posedge wr_n) begin
    automatic logic [7:0] code = vin;
    automatic int id;
    if (wr_armed) begin
      wr_armed = 1'b0;
      if ($realtime - wr_fall < TWR_NS) violations++;
      conv_id++;
      id = conv_id;
      converting = 1'b1;
      fork
        begin
          #(CONV_NS);
          if (id == conv_id) begin
            last_code  = code;
            converting = 1'b0;
            conv_count++;
            intr_n     = 1'b0;
          end
        end
      join_none
    end
  end

  always @(negedge rd_n) begin
    if (converting) violations++;
    intr_n = 1'b1;
    #(TACC_NS);
    if (!rd_n) drive = 1'b1;
  end

  always @(posedge rd_n) drive = 1'b0;

endmodule
