// Self-checking testbench of the data memory: word writes at byte
// addresses, index taken from address bits 9:2 (low two bits ignored),
// combinational read, write only with WrEn.
module tb_dmem;
  logic        clk = 1'b0, wr_en;
  logic [31:0] adr, din, dout;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  dmem dut (.clk(clk), .wr_en(wr_en), .adr(adr), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1'b0; adr = '0; din = '0;
    // Initialise every word through the write port
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); wr_en = 1'b1; adr = 32'(i) * 4; din = ~(32'(i) * 32'h0101_0101);
      model[i] = din;
    end
    @(negedge clk); wr_en = 1'b0;
    for (int i = 0; i < 256; i++) begin
      adr = 32'(i) * 4 + 32'($urandom % 4); #1;
      checks++;
      if (dout !== model[i]) begin failures++; $display("FAIL word %0d = %h expected %h", i, dout, model[i]); end
    end
    for (int n = 0; n < 600; n++) begin
      int unsigned w;
      @(negedge clk);
      w = $urandom % 256;
      wr_en = 1'($urandom); adr = {22'($urandom), 8'(w), 2'b00}; din = $urandom;
      @(posedge clk);
      if (wr_en) model[w] = din;
      #1;
      wr_en = 1'b0;
      adr = 32'($urandom % 256) * 4; #1;
      checks++;
      if (dout !== model[adr[9:2]]) begin failures++; $display("FAIL read %h = %h expected %h", adr, dout, model[adr[9:2]]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
