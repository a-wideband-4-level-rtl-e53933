// code_decoder_tb: exhaustive self-checking test of the period decoder.
//
// Every count 0..127 is applied, with and without the overflow flag.  The
// expected result comes from the carrier table written out here as count
// ranges: 94..96 -> code 1011111, data 11; 97..99 -> 1100010, 10;
// 100..102 -> 1100101, 01; 104..106 -> 1101001, 00; everything else, and
// every overflowed period, -> code 0000000 with no match.  The decision must
// appear exactly one clock after the input valid, and hold while no new
// period arrives.
module code_decoder_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [6:0] period = '0;
  logic       pvalid = 1'b0;
  logic       povf = 1'b0;
  logic [6:0] code;
  logic [1:0] data;
  logic       match, valid;

  int checks = 0, failures = 0;
  int hits[4] = '{0, 0, 0, 0};

  code_decoder dut (
    .clk, .rst_n, .period_i(period), .period_valid_i(pvalid),
    .period_ovf_i(povf), .code_o(code), .data_o(data),
    .match_o(match), .valid_o(valid)
  );

  always #100 clk = ~clk;

  function automatic void expected(input int p, input bit ovf,
                                   output logic [6:0] c, output logic [1:0] d,
                                   output bit m);
    c = 7'b0000000; d = 2'b00; m = 1'b0;
    if (!ovf) begin
      if (p >= 94 && p <= 96)        begin c = 7'b1011111; d = 2'b11; m = 1'b1; end
      else if (p >= 97 && p <= 99)   begin c = 7'b1100010; d = 2'b10; m = 1'b1; end
      else if (p >= 100 && p <= 102) begin c = 7'b1100101; d = 2'b01; m = 1'b1; end
      else if (p >= 104 && p <= 106) begin c = 7'b1101001; d = 2'b00; m = 1'b1; end
    end
  endfunction

  task automatic check_out(input logic [6:0] c, input logic [1:0] d, input bit m,
                           input bit v, input string what);
    checks++;
    if (code != c || match != m || valid != v || (m && data != d)) begin
      failures++;
      $display("FAIL %s: code=%b data=%b match=%0b valid=%0b, expected %b %b %0b %0b",
               what, code, data, match, valid, c, d, m, v);
    end
  endtask

  initial begin : watchdog
    #(200 * 5000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] c;
    logic [1:0] d;
    bit m;
    repeat (2) @(negedge clk);
    check_out(7'd0, 2'd0, 1'b0, 1'b0, "reset");
    rst_n = 1'b1;
    for (int ovf = 0; ovf < 2; ovf++) begin
      for (int p = 0; p < 128; p++) begin
        @(negedge clk);
        period = 7'(p); povf = 1'(ovf); pvalid = 1'b1;
        @(negedge clk);
        pvalid = 1'b0;
        period = 7'(p + 37);           // must not matter without valid
        expected(p, 1'(ovf), c, d, m);
        check_out(c, d, m, 1'b1, $sformatf("count %0d ovf %0d", p, ovf));
        if (m) hits[3 - int'(d)]++;
        @(negedge clk);
        check_out(c, d, m, 1'b0, $sformatf("hold %0d ovf %0d", p, ovf));
      end
    end
    checks++;
    if (hits[0] != 3 || hits[1] != 3 || hits[2] != 3 || hits[3] != 3) begin
      failures++;
      $display("FAIL window sizes %0d %0d %0d %0d", hits[0], hits[1], hits[2], hits[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
