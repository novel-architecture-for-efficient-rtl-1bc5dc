// tb_csd_converter: checks the binary-to-CSD converter at NBITS = 64.
// For each operand it compares the digit list with the one the reference
// NAF algorithm gives, checks that the digits add up to the operand (to the
// modulus for a zero operand) over exactly NBITS+2 positions, and checks
// that done is high ceil((NBITS+2)/2) clocks after the edge that samples
// start (two positions per clock).
// Operands: zero, one, the largest value, powers of two, runs of ones,
// alternating bit patterns (the longest digit lists) and random values.
module tb_csd_converter;
  import csd_pkg::*;
  import tb_ref_pkg::*;

  localparam int NB   = 64;
  localparam int MAXD = max_digits(NB);
  localparam int DW   = $clog2(MAXD + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic [NB:0]   x;
  logic [NB-1:0] nmod;
  logic busy, done;
  csd_digit_t [MAXD-1:0] digits;
  logic [DW-1:0] ndig;

  int checks = 0, failures = 0;

  csd_converter #(.NBITS(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [NB:0] xv);
    logic [2:0] q[$];
    logic [2:0] got[$];
    wide_t val;
    int pos, lat;
    x     = xv;
    @(negedge clk) start = 1;
    @(posedge clk);                 // the edge that samples start
    #1 start = 0;
    lat = 0;
    do begin @(posedge clk); #1 lat++; end while (!done && lat < 10000);
    checks++;
    if (lat != (NB + 3) / 2) begin
      failures++;
      $display("latency %0d for x=%h", lat, xv);
    end
    ref_csd(wide_t'(xv), wide_t'(nmod), NB, q);
    got.delete();
    for (int i = 0; i < int'(ndig); i++) got.push_back(digits[i]);
    checks++;
    if (got != q) begin
      failures++;
      $display("digit list differs for x=%h: %0d digits, expected %0d", xv, ndig, q.size());
    end
    csd_value(got, val, pos);
    checks++;
    if (pos != NB + 2 || val != ((xv == 0) ? wide_t'(nmod) : wide_t'(xv))) begin
      failures++;
      $display("value/positions wrong for x=%h: pos=%0d", xv, pos);
    end
    @(negedge clk);
  endtask

  initial begin
    nmod = 64'hC5A1_0F3B_9D27_E64B;
    x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run('0);
    run(1);
    run({(NB+1){1'b1}});
    for (int i = 0; i <= NB; i++) run((NB+1)'(1) << i);
    for (int i = 1; i <= NB; i++) run(((NB+1)'(1) << i) - 1);
    // alternating bits give the longest digit lists
    for (int i = 0; i < 4; i++) begin
      run({(NB+1)/2+1{2'b01}} >> i);
      run({(NB+1)/2+1{2'b10}} >> i);
    end
    for (int i = 0; i < 300; i++) run({$urandom, $urandom, $urandom} & {(NB+1){1'b1}} >> ($urandom % NB));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
