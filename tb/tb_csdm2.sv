// tb_csdm2: checks the CSD Montgomery multiplier at NBITS = 64.
// The multiplier digits come from the testbench's own reference recoding,
// not from the converter. For random odd moduli (full width and shorter)
// and operands X, Y below 2N, it checks that the result S is below 2N, that
// S * 2^(NBITS+2) = X * Y (mod N), and that done rises exactly ndig clocks
// after the edge that samples start (one digit per clock). Edge operands:
// X or Y zero, one, 2N-1, and X equal to N. Every other run supplies the
// digits a few at a time with random gaps, as a converter running alongside
// does; the multiplier must stall, and the result must not change.
module tb_csdm2;
  import csd_pkg::*;
  import tb_ref_pkg::*;

  localparam int NB   = 64;
  localparam int MAXD = max_digits(NB);
  localparam int DW   = $clog2(MAXD + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic [NB:0]   y, s;
  logic [NB-1:0] nmod;
  logic busy, done;
  csd_digit_t [MAXD-1:0] digits;
  logic [DW-1:0] navail;
  logic complete;
  int stalls = 0;

  int checks = 0, failures = 0;

  csdm2 #(.NBITS(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dut.busy && dut.stall) stalls++;

  task automatic run(wide_t xv, wide_t yv, wide_t nv, bit stream);
    logic [2:0] q[$];
    wide_t r, lhs, rhs;
    int lat;
    ref_csd(xv, nv, NB, q);
    digits = '0;
    foreach (q[i]) digits[i] = q[i];
    y    = yv[NB:0];
    nmod = nv[NB-1:0];
    navail   = stream ? '0 : DW'(q.size());
    complete = !stream;
    @(negedge clk) start = 1;
    @(posedge clk);
    #1 start = 0;
    lat = 0;
    do begin
      @(posedge clk); #1 lat++;
      if (stream && !complete && $urandom % 3 != 0) begin
        navail = navail + DW'(1);
        if (navail == DW'(q.size())) complete = 1;
      end
    end while (!done && lat < 10000);
    checks++;
    if (stream ? (lat < q.size()) : (lat != q.size())) begin
      failures++;
      $display("latency %0d, expected %0d", lat, q.size());
    end
    r   = wide_t'(s);
    lhs = mulmod(r, pow2mod(NB + 2, nv), nv);
    rhs = mulmod(xv, yv, nv);
    checks++;
    if (r >= 2 * nv || lhs != rhs) begin
      failures++;
      $display("wrong S=%h for X=%h Y=%h N=%h", s, xv, yv, nv);
    end
    @(negedge clk);
  endtask

  initial begin
    wide_t nv, xv, yv;
    digits = '0; navail = '0; complete = 1; y = '0; nmod = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      nv = rand_wide(NB);
      if (t % 4 == 3) nv = nv >> ($urandom % 40);
      nv[0] = 1'b1;
      if (t % 4 != 3) nv[NB-1] = 1'b1;
      if (nv < 3) nv = 3;
      xv = rand_wide(NB + 1) % (2 * nv);
      yv = rand_wide(NB + 1) % (2 * nv);
      unique case (t % 20)
        0: xv = 0;
        1: yv = 0;
        2: xv = 1;
        3: yv = 2 * nv - 1;
        4: xv = 2 * nv - 1;
        5: xv = nv;
        default: ;
      endcase
      run(xv, yv, nv, t % 2 == 1);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("the multiplier never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
