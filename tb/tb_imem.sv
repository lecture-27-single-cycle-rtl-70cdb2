// Self-checking testbench of the instruction memory: a program loaded
// through the load port is read back at every word address, with the word
// selected by address bits 9:2.
module tb_imem;
  logic        clk = 1'b0, load_we;
  logic [31:0] adr, instr, load_adr, load_data;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  imem dut (.clk(clk), .adr(adr), .instr(instr),
            .load_we(load_we), .load_adr(load_adr), .load_data(load_data));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_we = 1'b0; load_adr = '0; load_data = '0; adr = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); load_we = 1'b1; load_adr = 32'(i) * 4; load_data = $urandom;
      model[i] = load_data;
    end
    @(negedge clk); load_we = 1'b0; load_data = '1;
    @(negedge clk);
    for (int n = 0; n < 2; n++)
      for (int i = 0; i < 256; i++) begin
        adr = 32'(i) * 4; #1;
        checks++;
        if (instr !== model[i]) begin failures++; $display("FAIL mem[%h] = %h expected %h", adr, instr, model[i]); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
