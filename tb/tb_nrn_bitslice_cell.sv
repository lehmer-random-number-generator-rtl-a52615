// tb_nrn_bitslice_cell: exhaustive test of one column cell of the bit-slice
// NRN over all 4096 input combinations. The cell must conserve the weight of
// its inputs: ones(zcol) + d_in[0] + d_in[2] + e_in + c_in =
// 4*d_out[1] + 2*d_out[0] + 2*e_out + 2*c_out + r, with the 3:2 part alone
// giving count bit 0 + d_in[0] + d_in[2] = 2*e_out + (bit before the CPA),
// and d_out[2] must pass d_in[1] on.
module tb_nrn_bitslice_cell;
  logic [6:0] zcol;
  logic [2:0] d_in, d_out;
  logic       e_in, c_in, e_out, c_out, r;
  int checks = 0, failures = 0;

  nrn_bitslice_cell dut (.zcol(zcol), .d_in(d_in), .e_in(e_in), .c_in(c_in),
                         .d_out(d_out), .e_out(e_out), .c_out(c_out), .r(r));

  initial begin
    for (int i = 0; i < 4096; i++) begin
      {c_in, e_in, d_in, zcol} = 12'(i);
      #1;
      checks += 3;
      if ($countones(zcol) + int'(d_in[0]) + int'(d_in[2]) + int'(e_in) + int'(c_in)
          != 4 * int'(d_out[1]) + 2 * int'(d_out[0]) + 2 * int'(e_out) + 2 * int'(c_out) + int'(r)) begin
        failures++;
        if (failures < 10) $display("FAIL weight zcol=%b d_in=%b e=%b c=%b", zcol, d_in, e_in, c_in);
      end
      // 3:2 stage on its own: count bit 0 + d_in[0] + d_in[2] = 2*e_out + sp.
      if ((($countones(zcol) & 1) + int'(d_in[0]) + int'(d_in[2])) / 2 != int'(e_out)) begin
        failures++;
        if (failures < 10) $display("FAIL 3:2 carry zcol=%b d_in=%b", zcol, d_in);
      end
      if (d_out[2] != d_in[1] || {d_out[1], d_out[0]} != 2'($countones(zcol) >> 1)) begin
        failures++;
        if (failures < 10) $display("FAIL d_out zcol=%b d_in=%b d_out=%b", zcol, d_in, d_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
