// tb_mbe_multiplier: checks the signed/unsigned Booth multiplier against
// the integer product.
//   - N = 24 (the significand width): random and corner operands, both
//     modes, compared with a 64-bit product.
//   - N = 8 (the small example with five partial product rows): every
//     operand pair in both modes.
//   - N = 5 (odd width): every operand pair in both modes.
// It counts how often each mode was used and how often the mode changed
// between consecutive operations; each must happen.
module tb_mbe_multiplier;
  int checks = 0, failures = 0;
  int n_unsigned = 0, n_signed = 0, n_switch = 0;

  logic [23:0] a24, b24;
  logic [47:0] p24;
  logic        m24;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic        m8;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;
  logic        m5;

  mbe_multiplier              dut24 (.a(a24), .b(b24), .sign_mode(m24), .product(p24));
  mbe_multiplier #(.N(8))     dut8  (.a(a8),  .b(b8),  .sign_mode(m8),  .product(p8));
  mbe_multiplier #(.N(5))     dut5  (.a(a5),  .b(b5),  .sign_mode(m5),  .product(p5));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ext(input longint v, input int w, input logic sgn);
    longint m = (64'sd1 <<< w) - 1;
    v = v & m;
    if (sgn && v[w-1]) v = v - (64'sd1 <<< w);
    return v;
  endfunction

  task automatic check24(input logic [23:0] x, input logic [23:0] y, input logic md);
    longint want;
    if (md != m24) n_switch++;
    a24 = x; b24 = y; m24 = md;
    if (md) n_signed++; else n_unsigned++;
    want = ext(longint'(x), 24, md) * ext(longint'(y), 24, md);
    #1;
    checks++;
    if (p24 !== 48'(want)) begin
      failures++;
      if (failures < 10) $display("FAIL N=24 mode=%0b %h * %h = %h want %h", md, x, y, p24, 48'(want));
    end
  endtask

  initial begin
    logic [23:0] corner [6] = '{24'h000000, 24'h000001, 24'h7fffff, 24'h800000, 24'hffffff, 24'hc00000};
    m24 = 1'b0;
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++)
        for (int md = 0; md < 2; md++)
          check24(corner[i], corner[j], 1'(md));
    for (int i = 0; i < 20000; i++)
      check24(24'($urandom), 24'($urandom), 1'($urandom));

    for (int md = 0; md < 2; md++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          longint want;
          a8 = 8'(i); b8 = 8'(j); m8 = 1'(md);
          want = ext(longint'(i), 8, m8) * ext(longint'(j), 8, m8);
          #1;
          checks++;
          if (p8 !== 16'(want)) begin
            failures++;
            if (failures < 10) $display("FAIL N=8 mode=%0d %0d * %0d = %h", md, i, j, p8);
          end
        end
      end
      for (int i = 0; i < 32; i++) begin
        for (int j = 0; j < 32; j++) begin
          longint want;
          a5 = 5'(i); b5 = 5'(j); m5 = 1'(md);
          want = ext(longint'(i), 5, m5) * ext(longint'(j), 5, m5);
          #1;
          checks++;
          if (p5 !== 10'(want)) begin
            failures++;
            if (failures < 10) $display("FAIL N=5 mode=%0d %0d * %0d = %h", md, i, j, p5);
          end
        end
      end
    end

    $display("mode use: unsigned=%0d signed=%0d switches=%0d", n_unsigned, n_signed, n_switch);
    checks++;
    if (n_unsigned == 0 || n_signed == 0 || n_switch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
