// tb_exp_shift_reg: checks the exponent shift register at KE = 37 in both
// directions. After load, e_i must walk through the exponent bits in order
// (LSB first for one instance, MSB first for the other) on each update, hold
// while update is low, and restart on a new load.
module tb_exp_shift_reg;
  localparam int KE = 37;

  logic clk = 0, rst_n = 0, load = 0, update = 0;
  logic [KE-1:0] e;
  logic e_lsb, e_msb;
  int checks = 0, failures = 0;

  exp_shift_reg #(.KE(KE), .LSB_FIRST(1'b1)) u_lsb (.clk, .rst_n, .load, .update, .e, .e_i(e_lsb));
  exp_shift_reg #(.KE(KE), .LSB_FIRST(1'b0)) u_msb (.clk, .rst_n, .load, .update, .e, .e_i(e_msb));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KE-1:0] ev;
    e = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      ev = {$urandom, $urandom};
      @(negedge clk) begin e = ev; load = 1; end
      @(negedge clk) load = 0;
      for (int i = 0; i < KE; i++) begin
        checks++;
        if (e_lsb !== ev[i] || e_msb !== ev[KE-1-i]) begin
          failures++;
          $display("bit %0d: lsb-first %b (exp %b) msb-first %b (exp %b)",
                   i, e_lsb, ev[i], e_msb, ev[KE-1-i]);
        end
        // a clock without update must not move the register
        if ($urandom % 3 == 0) @(negedge clk);
        update = 1;
        @(negedge clk) update = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
