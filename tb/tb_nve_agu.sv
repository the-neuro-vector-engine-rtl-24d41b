// tb_nve_agu: self-checking test of the scratchpad address generator.
// Random region base/length, field and offset below the length; modulo mode
// must give base + (field + offset) % len, absolute mode the field itself.
module tb_nve_agu;
  logic mode;
  logic [9:0] field, iter_off, base, len, addr;
  int checks = 0, failures = 0;

  nve_agu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int e;
      mode = $urandom % 2;
      len = 10'(1 + $urandom % 300);
      base = 10'($urandom % (1024 - int'(len)));
      field = 10'($urandom % int'(len));
      iter_off = 10'($urandom % int'(len));
      #1;
      e = mode ? int'(base) + (int'(field) + int'(iter_off)) % int'(len) : int'(field);
      checks++;
      if (int'(addr) != e) begin
        failures++;
        $display("FAIL mode %b base %0d len %0d field %0d off %0d: %0d exp %0d",
                 mode, base, len, field, iter_off, addr, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
