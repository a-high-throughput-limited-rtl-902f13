// Test of the processing element: random parents, samples and corrections.
// The expected children come from the reference encoder and penalty
// functions of the testbench package, computed with integers.
module tb_spect_pe;
  import spect_pkg::*;
  import spect_ref_pkg::*;

  path_t parent, child0, child1;
  soft_t r0, r1;
  dist_t e_sub;
  int checks = 0, failures = 0;

  spect_pe dut (.parent, .r0, .r1, .e_sub, .child0, .child1);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 4000; it++) begin
      int ir0, ir1, e, pd;
      ir0 = $urandom_range(0, 31) - 16;
      ir1 = $urandom_range(0, 31) - 16;
      pd  = $urandom_range(0, 40);
      e   = (it % 3 == 0) ? $urandom_range(0, 40) : 0;
      parent.valid = ($urandom_range(0, 7) != 0);
      parent.d     = dist_t'(pd);
      parent.hist  = {$urandom, $urandom};
      r0 = soft_t'(ir0);
      r1 = soft_t'(ir1);
      e_sub = dist_t'(e);
      #1;
      for (int b = 0; b < 2; b++) begin
        bit [PLEN-1:0] h;
        int s;
        path_t c;
        h = {parent.hist[PLEN-2:0], b[0]};
        s = pd + pen(b[0], ir0) + pen(enc_parity(h), ir1) - e;
        if (s < 0) s = 0;
        c = (b != 0) ? child1 : child0;
        check(c.hist == h, "child history");
        check(int'(c.d) == s, "child distance");
        check(c.valid == (parent.valid && s <= 32), "child purge");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
