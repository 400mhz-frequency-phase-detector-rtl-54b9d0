// Testbench for freq_calc: random and corner-case count pairs; the expected
// frequency floor(nx * FS_HZ / ns) is computed here with 64-bit arithmetic,
// and the latency from start to done is checked to be 66 clocks.
module tb_freq_calc;
  import fpd_pkg::*;
  localparam int unsigned FS = 100_000_000;
  localparam int          LATENCY = 2 * CNT_W + 2;

  logic   clk = 1'b0;
  logic   rst_n = 1'b1;
  logic   start = 1'b0;
  count_t nx = '0, ns = '0;
  logic   busy, done;
  count_t fx_hz;
  int     checks = 0;
  int     failures = 0;

  freq_calc #(.FS_HZ(FS)) dut (.clk, .rst_n, .start, .nx, .ns, .busy, .done, .fx_hz);

  always #5ns clk = ~clk;

  function automatic count_t model(input count_t x, input count_t s);
    longint unsigned q;
    if (s == 0) return '0;
    q = (longint'(x) * longint'(FS)) / longint'(s);
    if (q > 64'hFFFF_FFFF) return '1;
    return count_t'(q);
  endfunction

  task automatic one(input count_t x, input count_t s);
    int cyc;
    @(negedge clk);
    nx = x; ns = s; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 200) break;
    end
    checks++;
    if (fx_hz !== model(x, s)) begin
      failures++;
      $display("FAIL nx=%0d ns=%0d: fx=%0d expected %0d", x, s, fx_hz, model(x, s));
    end
    checks++;
    if (cyc != LATENCY) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, LATENCY);
    end
  endtask

  initial begin
    #2ns rst_n = 1'b0;
    #20ns rst_n = 1'b1;
    one(200_000_000, 100_000_000);   // 200 MHz over a 1 s gate
    one(200_000_001, 100_000_000);
    one(120_000_000, 99_999_999);
    one(1, 100_000_000);             // 1 Hz
    one(5, 0);                       // no time base count
    one(32'hFFFF_FFFF, 1);           // overflow saturates
    one(0, 1234);
    for (int i = 0; i < 40; i++) begin
      count_t s, x;
      s = $urandom_range(32'h7FFF_FFFF, 1000);
      x = $urandom() % (s * 4 + 1);
      one(x, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
