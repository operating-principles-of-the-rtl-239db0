// tb_mib_mux2 - checks the CPU ID (8-bit) and resource counter (16-bit)
// source selectors against random register and connector values.
module tb_mib_mux2;
  logic [7:0]  a8, b8, y8;
  logic [15:0] a16, b16, y16;
  logic        s8, s16;
  int checks = 0, failures = 0;

  mib_mux2 #(.WIDTH(8))  u8  (.a(a8),  .b(b8),  .sel(s8),  .y(y8));
  mib_mux2 #(.WIDTH(16)) u16 (.a(a16), .b(b16), .sel(s16), .y(y16));

  initial begin
    for (int i = 0; i < 200; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); s8 = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); s16 = 1'($urandom);
      #1;
      checks += 2;
      if (y8 != (s8 ? b8 : a8)) begin failures++; $display("FAIL cpu mux %h %h %b -> %h", a8, b8, s8, y8); end
      if (y16 != (s16 ? b16 : a16)) begin failures++; $display("FAIL rc mux"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
