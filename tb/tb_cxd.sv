// tb_cxd: checks the context generator against the context rules written out
// independently here (zero coding for all orientations, sign coding with the
// XOR bit, refinement), over random neighbourhoods.
module tb_cxd;
  import jp2k_pkg::*;
  import ebcot_ref_pkg::*;
  nbr_t nbr;
  band_e band;
  logic first_ref;
  logic [4:0] zc_cx, sc_cx, mr_cx;
  logic sc_xor, any_sig;
  int checks = 0, failures = 0;

  cxd dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d (sig %b sgn %b band %0d)", what, got, exp, nbr.sig, nbr.sgn, band);
    end
  endtask

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int h, v, d, hc, vc, ecx, ex;
      nbr.sig   = 8'($urandom);
      nbr.sgn   = 4'($urandom);
      band      = band_e'($urandom % 4);
      first_ref = 1'($urandom);
      #1;
      h = nbr.sig[0] + nbr.sig[1];
      v = nbr.sig[2] + nbr.sig[3];
      d = nbr.sig[4] + nbr.sig[5] + nbr.sig[6] + nbr.sig[7];
      chk("zc", zc_cx, zc(int'(band), h, v, d));
      hc = (nbr.sig[0] ? (nbr.sgn[0] ? -1 : 1) : 0) + (nbr.sig[1] ? (nbr.sgn[1] ? -1 : 1) : 0);
      vc = (nbr.sig[2] ? (nbr.sgn[2] ? -1 : 1) : 0) + (nbr.sig[3] ? (nbr.sgn[3] ? -1 : 1) : 0);
      hc = (hc > 1) ? 1 : (hc < -1) ? -1 : hc;
      vc = (vc > 1) ? 1 : (vc < -1) ? -1 : vc;
      // sign context table: rows H = 1, 0, -1; columns V = 1, 0, -1
      case ({hc, vc})
        {1, 1}:   begin ecx = 13; ex = 0; end
        {1, 0}:   begin ecx = 12; ex = 0; end
        {1, -1}:  begin ecx = 11; ex = 0; end
        {0, 1}:   begin ecx = 10; ex = 0; end
        {0, 0}:   begin ecx = 9;  ex = 0; end
        {0, -1}:  begin ecx = 10; ex = 1; end
        {-1, 1}:  begin ecx = 11; ex = 1; end
        {-1, 0}:  begin ecx = 12; ex = 1; end
        default:  begin ecx = 13; ex = 1; end
      endcase
      chk("sc", sc_cx, ecx);
      chk("xor", sc_xor, ex);
      chk("mr", mr_cx, !first_ref ? 16 : (nbr.sig != 0) ? 15 : 14);
      chk("any", any_sig, nbr.sig != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
