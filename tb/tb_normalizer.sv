// tb_normalizer: checks the normalizer at the single-precision size (48-bit
// product, 9-bit exponent) and at the small size of an 8-bit product with a
// 6-bit exponent. Products with the leading one at either possible position
// are applied; the expected outputs are the unchanged pair or the product
// shifted right by one with the exponent plus one. Both cases must occur.
module tb_normalizer;
  int checks = 0, failures = 0;
  int n_shift = 0, n_pass = 0;

  logic [47:0] ip, so;
  logic [8:0]  ei;
  logic [9:0]  eo;
  logic        sh;
  logic [7:0]  ip8, so8;
  logic [5:0]  ei8;
  logic [6:0]  eo8;
  logic        sh8;

  normalizer dut (.ip(ip), .exp_in(ei), .sig_out(so), .exp_out(eo), .shifted(sh));
  normalizer #(.IP_W(8), .EXP_IN_W(6)) dut8 (.ip(ip8), .exp_in(ei8), .sig_out(so8), .exp_out(eo8), .shifted(sh8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic top;
      longint want_sig;
      int want_exp;
      top = 1'($urandom);
      ip  = {top, ~top, 46'({$urandom, $urandom})};
      ei  = 9'($urandom);
      want_sig = top ? longint'(ip) / 2 : longint'(ip);
      want_exp = int'(ei) + (top ? 1 : 0);
      #1;
      checks++;
      if (so !== 48'(want_sig) || int'(eo) != want_exp || sh !== top) begin
        failures++;
        if (failures < 10) $display("FAIL ip=%h e=%0d -> %h %0d", ip, ei, so, eo);
      end
      if (top) n_shift++; else n_pass++;
    end
    // small size: every product with a leading one in bit 7 or 6
    for (int v = 64; v < 256; v++) begin
      for (int e = 0; e < 64; e++) begin
        int ws, we;
        ip8 = 8'(v); ei8 = 6'(e);
        ws = (v >= 128) ? v / 2 : v;
        we = e + ((v >= 128) ? 1 : 0);
        #1;
        checks++;
        if (int'(so8) != ws || int'(eo8) != we) begin
          failures++;
          if (failures < 10) $display("FAIL small ip=%0d e=%0d -> %0d %0d", v, e, so8, eo8);
        end
      end
    end
    // the figure example: 10.01011000 at exponent 134 -> 1.001011000 at 135
    ip = {10'b1001011000, 38'd0}; ei = 9'd134; #1;
    checks++;
    if (so !== {11'b01001011000, 37'd0} || eo !== 10'd135) failures++;

    $display("shifted=%0d passed=%0d", n_shift, n_pass);
    checks++;
    if (n_shift == 0 || n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
