// tb_ecc_memory - self-checking test of ecc_memory (W = 20, DEPTH = 16).
// Checks: rdata is zero after reset; a word written is read back one cycle
// after re; rdata holds while re = 0; an upset flips exactly the masked bits
// of one word; a write and an upset to the same word in one cycle leave the
// written value. A shadow array in the testbench is the reference.
module tb_ecc_memory;
  localparam int W = 20, DEPTH = 16, AW = 4;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, re = 1'b0, upset_en = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0, upset_addr = '0;
  logic [W-1:0]  wdata = '0, upset_mask = '0, rdata;
  logic [W-1:0]  shadow [DEPTH];

  ecc_memory #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input logic [AW-1:0] a, input string what);
    @(negedge clk); re = 1'b1; raddr = a;
    @(negedge clk); re = 1'b0;
    chk(what, rdata, shadow[a]);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    chk("rdata after reset", rdata, '0);
    rst_n = 1'b1;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1'b1; waddr = AW'(a); wdata = W'($urandom); shadow[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < DEPTH; a++) read_check(AW'(a), "read back");
    // hold while re = 0
    begin
      logic [W-1:0] held;
      held = rdata;
      @(negedge clk); we = 1'b1; waddr = 4'd3; wdata = ~shadow[3]; shadow[3] = wdata;
      @(negedge clk); we = 1'b0;
      repeat (3) @(negedge clk);
      chk("rdata holds without re", rdata, held);
    end
    // latency: rdata changes exactly one edge after re
    @(negedge clk); re = 1'b1; raddr = 4'd3;
    chk("no change before the edge", rdata, shadow[DEPTH-1]);
    @(negedge clk); re = 1'b0;
    chk("one-cycle latency", rdata, shadow[3]);
    // upsets
    for (int n = 0; n < 200; n++) begin
      automatic logic [AW-1:0] a = AW'($urandom);
      automatic logic [W-1:0]  m = W'($urandom);
      @(negedge clk); upset_en = 1'b1; upset_addr = a; upset_mask = m;
      shadow[a] = shadow[a] ^ m;
      @(negedge clk); upset_en = 1'b0;
      read_check(a, "after upset");
      read_check(a + 4'd1, "neighbour after upset");
    end
    // write and upset to the same word: the write wins
    @(negedge clk);
    we = 1'b1; waddr = 4'd7; wdata = 20'h5A5A5; shadow[7] = wdata;
    upset_en = 1'b1; upset_addr = 4'd7; upset_mask = 20'hFFFFF;
    @(negedge clk); we = 1'b0; upset_en = 1'b0;
    read_check(4'd7, "write wins over upset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
