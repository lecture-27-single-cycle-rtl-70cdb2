// Self-checking testbench of the two-to-one multiplexer at 32 and 5 bits.
module tb_mux2;
  logic        sel;
  logic [31:0] a0, a1, y;
  logic [4:0]  b0, b1, z;
  int checks = 0, failures = 0;

  mux2 #(.W(32)) dut32 (.sel(sel), .in0(a0), .in1(a1), .y(y));
  mux2 #(.W(5))  dut5  (.sel(sel), .in0(b0), .in1(b1), .y(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = 1'($urandom); a0 = $urandom; a1 = $urandom; b0 = 5'($urandom); b1 = 5'($urandom);
      #1;
      checks += 2;
      if (y !== (sel ? a1 : a0)) begin failures++; $display("FAIL 32-bit sel=%b", sel); end
      if (z !== (sel ? b1 : b0)) begin failures++; $display("FAIL 5-bit sel=%b", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
