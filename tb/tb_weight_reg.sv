// tb_weight_reg: checks the connection-weight register.
// Random shift enables and data; the register must load d on a clock edge
// with shift high and hold otherwise, and clear on reset.
`timescale 1ns/1ps
module tb_weight_reg;
  localparam int W_W = 8;
  logic clk = 0, rst_n = 0, shift = 0;
  logic [W_W-1:0] d = '0, q;
  int checks = 0, failures = 0;
  logic [W_W-1:0] model;

  weight_reg #(.W_W(W_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    checks++; if (q !== '0) begin failures++; $display("FAIL reset value %0d", q); end
    rst_n = 1;
    model = '0;
    repeat (400) begin
      @(negedge clk);
      shift = ($urandom % 3) == 0;
      d     = W_W'($urandom);
      @(posedge clk);
      if (shift) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%0d want %0d", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
