// Self-checking testbench of the register file: random writes and reads
// against a reference array, register 0 held at zero, reads combinational
// (new value visible right after the writing edge, not before), and a dump.
module tb_regfile;
  logic        clk = 1'b0, we, dmp;
  logic [4:0]  rw, ra, rb;
  logic [31:0] bus_w, bus_a, bus_b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .we(we), .dmp(dmp), .rw(rw), .bus_w(bus_w),
               .ra(ra), .bus_a(bus_a), .rb(rb), .bus_b(bus_b));

  always #5 clk = ~clk;

  task automatic check_read(input logic [4:0] x, input logic [4:0] y);
    ra = x; rb = y; #1;
    checks += 2;
    if (bus_a !== model[x]) begin failures++; $display("FAIL busA R%0d=%h expected %h", x, bus_a, model[x]); end
    if (bus_b !== model[y]) begin failures++; $display("FAIL busB R%0d=%h expected %h", y, bus_b, model[y]); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; dmp = 1'b0; rw = '0; bus_w = '0; ra = '0; rb = '0;
    // Fill every register, including an attempt on register 0
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1'b1; rw = 5'(i); bus_w = 32'h1000_0000 + 32'(i) * 32'h111;
      model[i] = (i == 0) ? 32'h0 : bus_w;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 32; i++) check_read(5'(i), 5'(31 - i));
    // Random traffic
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); rw = 5'($urandom); bus_w = $urandom;
      check_read(rw, 5'($urandom));     // before the edge: old value
      @(posedge clk);
      if (we && rw != 0) model[rw] = bus_w;
      #1;
      check_read(rw, 5'($urandom));     // after the edge: new value
    end
    @(negedge clk); we = 1'b0; dmp = 1'b1;
    @(negedge clk); dmp = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
