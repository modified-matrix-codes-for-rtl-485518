// tb_mmc_widths - workload test over the evaluated data widths 8, 16, 32 and
// 64 bits: one mmc_width_runner per width, run one after another.
module tb_mmc_widths;
  logic clk = 1'b0;
  logic [3:0] start = '0, done;
  int c [4], f [4];

  always #5 clk = ~clk;

  mmc_width_runner #(.K(8))  r8  (.clk(clk), .start(start[0]), .done(done[0]), .checks(c[0]), .failures(f[0]));
  mmc_width_runner #(.K(16)) r16 (.clk(clk), .start(start[1]), .done(done[1]), .checks(c[1]), .failures(f[1]));
  mmc_width_runner #(.K(32)) r32 (.clk(clk), .start(start[2]), .done(done[2]), .checks(c[2]), .failures(f[2]));
  mmc_width_runner #(.K(64)) r64 (.clk(clk), .start(start[3]), .done(done[3]), .checks(c[3]), .failures(f[3]));

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); start[i] = 1'b1;
      wait (done[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3]);
    $finish;
  end
endmodule
