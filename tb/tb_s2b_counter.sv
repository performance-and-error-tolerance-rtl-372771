// tb_s2b_counter: feeds periods of 1024 stream bits with a known number of
// ones and checks the converted output round((ones - 512) * G / 256) / 512
// (with saturation), for unit gain and for a gain of 692/256, plus the
// y_valid timing (one cycle after the last bit).
module tb_s2b_counter;
  localparam int K = 10, W = 10;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, last = 1'b0, s = 1'b0;
  logic signed [W-1:0] y1, y2;
  logic v1, v2;
  int checks = 0, failures = 0;

  s2b_counter #(.K(K), .W(W), .GF(8), .GAIN_Q(256)) u1 (.clk, .rst_n, .clr, .en, .last, .s, .y(y1), .y_valid(v1));
  s2b_counter #(.K(K), .W(W), .GF(8), .GAIN_Q(692)) u2 (.clk, .rst_n, .clr, .en, .last, .s, .y(y2), .y_valid(v2));

  always #5 clk = ~clk;

  function automatic int expect_y(input int ones, input int g);
    int p, q;
    p = (ones - 512) * g;
    q = (p + 128) >>> 8;       // round half up
    if (q > 511) q = 511;
    if (q < -512) q = -512;
    return q;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones_list [10] = '{0, 1, 300, 511, 512, 513, 700, 1000, 1023, 1024};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      int ones, got;
      ones = (t < 10) ? ones_list[t] : int'($urandom_range(1024));
      @(negedge clk);
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      en = 1'b1;
      got = 0;
      for (int i = 0; i < 1024; i++) begin
        // spread the ones: bit i is 1 when floor((i+1)*ones/1024) advances
        s = (((i + 1) * ones) / 1024) != ((i * ones) / 1024);
        got += int'(s);
        last = (i == 1023);
        @(negedge clk);
        if (i < 1023) check(!v1, "no early y_valid");
      end
      en = 1'b0;
      last = 1'b0;
      check(v1 && v2, "y_valid one cycle after last bit");
      check(got == ones, "stimulus");
      check(int'(y1) == expect_y(ones, 256), $sformatf("gain 1: ones=%0d y=%0d exp=%0d", ones, y1, expect_y(ones, 256)));
      check(int'(y2) == expect_y(ones, 692), $sformatf("gain 2.7: ones=%0d y=%0d exp=%0d", ones, y2, expect_y(ones, 692)));
      @(negedge clk);
      check(!v1, "y_valid is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
