// tb_rft_adder_widths: runs the adder at the operand widths whose power and
// delay are compared for the design (1, 4, 16, 32 and 64 bits; 128 bits is
// covered by tb_rft_adder). Each width is programmed and checked by its own
// adder_width_check harness, all sharing one clock.
module tb_rft_adder_widths;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int cycles = 0;
  localparam int NW = 5;
  logic [NW-1:0] done;
  int c [NW];
  int f [NW];

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  adder_width_check #(.N(1))  u_w1  (.clk(clk), .done(done[0]), .checks(c[0]), .failures(f[0]));
  adder_width_check #(.N(4))  u_w4  (.clk(clk), .done(done[1]), .checks(c[1]), .failures(f[1]));
  adder_width_check #(.N(16)) u_w16 (.clk(clk), .done(done[2]), .checks(c[2]), .failures(f[2]));
  adder_width_check #(.N(32)) u_w32 (.clk(clk), .done(done[3]), .checks(c[3]), .failures(f[3]));
  adder_width_check #(.N(64)) u_w64 (.clk(clk), .done(done[4]), .checks(c[4]), .failures(f[4]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    for (int i = 0; i < NW; i++) begin
      checks   += c[i];
      failures += f[i];
    end
    $display("widths 1,4,16,32,64 done after %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
