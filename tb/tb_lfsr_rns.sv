// tb_lfsr_rns: checks the 10-bit LFSR random number source against an
// independent next-state model (polynomial x^10 + x^7 + 1 with the all-zero
// state spliced in after 10'b1000000000), checks that one period visits all
// 1024 states exactly once, and that load returns to the seed and en = 0
// holds the state.
module tb_lfsr_rns;
  localparam int K = 10;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [K-1:0] r;
  int checks = 0, failures = 0;
  bit seen [1 << K];

  lfsr_rns #(.K(K), .SEED(10'h2A5)) dut (.clk, .rst_n, .load, .en, .r);

  always #5 clk = ~clk;

  function automatic logic [K-1:0] ref_next(input logic [K-1:0] s);
    if (s == 10'b10_0000_0000) return '0;
    if (s == '0) return 10'd1;
    return {s[8:0], s[9] ^ s[6]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] prev;
    int distinct;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(r == 10'h2A5, "reset value");
    en = 1'b1;
    for (int i = 0; i < (1 << K); i++) begin
      prev = r;
      seen[r] = 1'b1;
      @(negedge clk);
      check(r == ref_next(prev), $sformatf("step %0d: %h -> %h", i, prev, r));
    end
    distinct = 0;
    for (int i = 0; i < (1 << K); i++) if (seen[i]) distinct++;
    check(distinct == (1 << K), $sformatf("period covers %0d states", distinct));
    check(r == 10'h2A5, "period is 1024");
    en = 1'b0;
    prev = r;
    repeat (3) @(negedge clk);
    check(r == prev, "hold when en = 0");
    en = 1'b1;
    repeat (7) @(negedge clk);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(r == 10'h2A5, "load seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
