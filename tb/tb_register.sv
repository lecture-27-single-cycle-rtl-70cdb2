// Self-checking testbench of the N-bit register: loads with the write
// enable asserted, holds with it deasserted, and resets synchronously.
module tb_register;
  logic        clk = 1'b0, rst, we;
  logic [31:0] d, q, model;
  int checks = 0, failures = 0;

  register #(.N(32), .RESET_VALUE(32'hdead_beef)) dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; d = '0;
    @(posedge clk); #1;
    checks++;
    if (q !== 32'hdead_beef) begin failures++; $display("FAIL reset value %h", q); end
    model = 32'hdead_beef;
    for (int i = 0; i < 300; i++) begin
      rst = ($urandom % 20) == 0;
      we  = 1'($urandom);
      d   = $urandom;
      // Data out must not change before the edge
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL output changed before edge"); end
      @(posedge clk);
      if (rst) model = 32'hdead_beef;
      else if (we) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL rst=%b we=%b q=%h expected %h", rst, we, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
