// tb_io_decoder: exhaustive self-checking test of the I/O slot decoder.
// Every address is applied with vma high and low; the expected slot select and
// register select are worked out here from the slot layout (base 16'h8000,
// four bytes per slot, eight slots), including the pattern program's
// interface at 16'h801A / 16'h801B in slot 6.
module tb_io_decoder;
  logic [15:0] addr = '0;
  logic vma = 1'b0;
  logic [7:0] slot_sel;
  logic [1:0] rs;
  int checks = 0, failures = 0;

  io_decoder dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    for (int a = 0; a < 65536; a++) begin
      for (int v = 0; v < 2; v++) begin
        addr = 16'(a); vma = 1'(v);
        #1;
        exp = 8'h00;
        if (v == 1 && a >= 32'h8000 && a < 32'h8020) exp = 8'h01 << ((a - 32'h8000) / 4);
        checks++;
        if (slot_sel !== exp || rs !== 2'(a % 4)) begin
          failures++;
          if (failures < 10) $display("FAIL addr %h vma %0d: sel %b rs %0d", a, v, slot_sel, rs);
        end
      end
    end
    addr = 16'h801A; vma = 1'b1; #1;
    checks++;
    if (slot_sel !== 8'b0100_0000 || rs !== 2'd2) begin failures++; $display("FAIL $801A"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
