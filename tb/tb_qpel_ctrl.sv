// tb_qpel_ctrl: for every quarter-pel position, feeds the two selected lines
// of a set of distinct reference values through an independent average and
// compares with the position's rule (e.g. a = (D + b + 1) / 2).
module tb_qpel_ctrl;
  import subpel_pkg::*;

  frac_t frac;
  sel_t  sel1, sel2;
  int checks = 0, failures = 0;

  qpel_ctrl dut (.frac, .sel1, .sel2);

  // Values of the neighbourhood of one pixel: D, b, h, j, s(b'), H(D'),
  // and the right-hand neighbours E (of D), m (of h), I (of D').
  int vD = 10, vb = 40, vh = 70, vj = 100, vs = 130, vH = 160, vE = 190, vm = 220, vI = 250;

  function automatic int val(sel_t s);
    case (s.line)
      LINE_D:  return s.shift ? vE : vD;
      LINE_B:  return vb;
      LINE_H:  return s.shift ? vm : vh;
      LINE_J:  return vj;
      LINE_BP: return vs;
      default: return s.shift ? vI : vH;
    endcase
  endfunction

  function automatic int avg(int x, int y);
    return (x + y + 1) / 2;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v [16];
    exp_v = '{vD, avg(vD, vb), vb, avg(vb, vE),
              avg(vD, vh), avg(vD, vj), avg(vb, vj), avg(vE, vj),
              vh, avg(vh, vj), vj, avg(vj, vm),
              avg(vh, vH), avg(vH, vj), avg(vj, vs), avg(vI, vj)};
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        int got;
        frac = '{x: 2'(x), y: 2'(y)};
        #1;
        got = avg(val(sel1), val(sel2));
        checks++;
        if (got != exp_v[y*4 + x]) begin
          failures++;
          $display("x=%0d y=%0d: selects give %0d expected %0d", x, y, got, exp_v[y*4 + x]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
