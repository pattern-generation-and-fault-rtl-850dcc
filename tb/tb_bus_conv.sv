// tb_bus_conv: self-checking test of the SS-50 to S-100 bus converter.
// Applies every combination of R/W, VMA, Phi2, the address lines A13-A15 and
// random other address and data values, and checks each output against the
// converter's intended behaviour written as truth statements: write strobe
// only for a valid write in Phi2, data-in enable only for a valid read in
// Phi2, Modified R/W only for a valid read of $C000-$DFFF, address and data
// passed through (data inverted across the transceivers), SINP/SOUT low.
module tb_bus_conv;
  logic [15:0] ss_a = '0;
  logic [7:0]  ss_dn_in = '0, ss_dn_out, s_do, s_di = '0;
  logic ss_dn_oe, ss_rw = 1'b1, ss_vma_n = 1'b1, ss_phi2_n = 1'b1, ss_reset = 1'b0;
  logic [15:0] s_a;
  logic s_rw, smemr_n, s_phi2, pwr_n, mwrite, pdbin_n, sinp, sout, s_reset, mod_rw;
  int checks = 0, failures = 0;

  bus_conv dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b expected %b (a=%h rw=%b vma_n=%b phi2_n=%b)",
                                                what, got, exp, ss_a, ss_rw, ss_vma_n, ss_phi2_n); end
  endtask

  initial begin
    logic valid, phase, rd, wr, win;
    for (int i = 0; i < 64; i++) begin
      for (int r = 0; r < 4; r++) begin
        {ss_rw, ss_vma_n, ss_phi2_n} = 3'(i);
        ss_a = {3'(i >> 3), 13'($urandom)};
        ss_dn_in = 8'($urandom);
        s_di = 8'($urandom);
        ss_reset = 1'($urandom);
        #1;
        valid = !ss_vma_n; phase = !ss_phi2_n; rd = ss_rw; wr = !ss_rw;
        win = (ss_a[15:13] == 3'b110);
        check("pwr_n", pwr_n, !(valid && phase && wr));
        check("mwrite", mwrite, valid && phase && wr);
        check("pdbin_n", pdbin_n, !(valid && phase && rd));
        check("mod_rw", mod_rw, valid && rd && win);
        check("oe", ss_dn_oe, valid && rd && win);
        check("smemr_n", smemr_n, !valid);
        check("phi2", s_phi2, phase);
        check("rw", s_rw, ss_rw);
        check("reset", s_reset, ss_reset);
        check("sinp/sout", sinp | sout, 1'b0);
        checks++;
        if (s_a !== ss_a || s_do !== ~ss_dn_in || ss_dn_out !== ~s_di) begin
          failures++; $display("FAIL pass-through");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
