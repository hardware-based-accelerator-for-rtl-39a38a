// range_search_tb: checks the two-stage M-tree prune test.
//
// Directed cases at the boundaries of both inequalities (equal to the limit,
// one past it, root without parent, leaf entries whose radius must be
// ignored, an invalid entry), then random operands. Expected values are
// computed with integer arithmetic from the four M-tree range-search
// conditions. The block is combinational: each case settles for 1 ns.
`timescale 1ns/1ps
module range_search_tb;
  import mtree_pkg::*;

  val_t  q, r_q, dpq;
  logic  has_parent, leaf, valid;
  ro_t   ro;
  logic  stage1_pass, stage2_pass, node_hit, obj_out;
  addr_t ptr;
  val_t  d_rq;

  int checks = 0, failures = 0;

  range_search dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int iq, int ir, int idpq, bit hp, bit lf, bit vl,
                       int val, int rad, int dpar, int p);
    int lim, e_d, diff;
    bit e_s1, e_s2;
    q = val_t'(iq); r_q = val_t'(ir); dpq = val_t'(idpq);
    has_parent = hp; leaf = lf; valid = vl;
    ro = '{value: val_t'(val), radius: val_t'(rad), dpar: val_t'(dpar), ptr: addr_t'(p)};
    #1;
    lim  = ir + (lf ? 0 : rad);
    e_d  = (val > iq) ? val - iq : iq - val;
    diff = (idpq > dpar) ? idpq - dpar : dpar - idpq;
    e_s1 = !hp || (diff <= lim);
    e_s2 = (e_d <= lim);
    checks++;
    if (d_rq != val_t'(e_d) || stage1_pass != e_s1 || stage2_pass != e_s2 ||
        node_hit != (vl && e_s1 && e_s2 && !lf) ||
        obj_out  != (vl && e_s1 && e_s2 && lf) || ptr != addr_t'(p)) begin
      failures++;
      $display("FAIL q=%0d r=%0d dpq=%0d hp=%0d leaf=%0d v=%0d ro=(%0d,%0d,%0d): d=%0d s1=%0d s2=%0d hit=%0d obj=%0d",
               iq, ir, idpq, hp, lf, vl, val, rad, dpar, d_rq, stage1_pass, stage2_pass, node_hit, obj_out);
    end
  endtask

  initial begin
    // stage 2 boundary, non-leaf: |10-20| = 10 = 4 + 6
    apply(10, 4, 0, 0, 0, 1, 20, 6, 0, 7);
    apply(10, 4, 0, 0, 0, 1, 21, 6, 0, 7);
    // stage 2 boundary, leaf: radius ignored
    apply(10, 4, 0, 0, 1, 1, 14, 50, 0, 9);
    apply(10, 4, 0, 0, 1, 1, 15, 50, 0, 9);
    apply(10, 4, 0, 0, 1, 1, 6, 0, 0, 9);
    apply(10, 4, 0, 0, 1, 1, 5, 0, 0, 9);
    // stage 1 boundary: |30-20| = 10 = 4 + 6, then 11
    apply(10, 4, 30, 1, 0, 1, 12, 6, 20, 3);
    apply(10, 4, 31, 1, 0, 1, 12, 6, 20, 3);
    apply(10, 4, 9, 1, 0, 1, 12, 6, 20, 3);
    // stage 1 ignored at the root
    apply(10, 4, 255, 0, 0, 1, 12, 6, 0, 3);
    // invalid entry never hits
    apply(10, 4, 0, 0, 1, 0, 10, 0, 0, 3);
    apply(10, 4, 0, 0, 0, 0, 10, 0, 0, 3);
    // widest operands: the sum r(Q) + r(Or) must not wrap
    apply(0, 255, 0, 0, 0, 1, 255, 255, 0, 1);
    apply(255, 200, 0, 1, 0, 1, 0, 100, 255, 1);
    for (int i = 0; i < 20000; i++)
      apply($urandom_range(0, 255), $urandom_range(0, (i % 2 != 0) ? 255 : 16),
            $urandom_range(0, 255), 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)),
            $urandom_range(0, 7) != 0, $urandom_range(0, 255),
            $urandom_range(0, (i % 3 != 0) ? 40 : 255), $urandom_range(0, 255),
            $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
