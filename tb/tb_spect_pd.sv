// Test of a path-data register array: a random sequence of legal commands
// (init, extend, broadcast, receive, overflow re-purge, truncation,
// underflow relief) is applied to a PD, and a two-slot model kept in the
// testbench predicts its category, survivor, bus output and whether an
// overflow re-purge would keep a path.
module tb_spect_pd;
  import spect_pkg::*;

  localparam int TL = 32, RL = 4;   // T = 8 and R = 1 in LSB

  logic clk = 0, rst_n = 0;
  logic init = 0, extend = 0, bcast = 0, recv = 0, ovf = 0, udf = 0, trunc = 0;
  path_t child0 = '0, child1 = '0, bus_in = '0;
  path_t survivor, bus_out;
  logic empty, congested, ovf_keeps;

  spect_pd #(.ROOT(1'b1)) dut (.clk, .rst_n, .init, .extend, .child0, .child1, .bcast,
                               .recv, .bus_in, .ovf, .udf, .trunc, .survivor,
                               .bus_out, .empty, .congested, .ovf_keeps);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cmd [7];
  path_t m0, m1;   // model slots

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic path_t rnd_path(bit v);
    path_t p;
    p.valid = v;
    p.d     = dist_t'($urandom_range(0, 40));
    p.hist  = {$urandom, $urandom};
    return p;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m0 = '0; m1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      int c;
      bit is_empty, is_cong;
      // compare with the model
      is_empty = !m0.valid && !m1.valid;
      is_cong  = m0.valid && m1.valid;
      check(empty == is_empty, "empty");
      check(congested == is_cong, "congested");
      if (m0.valid) check(survivor == m0, "survivor slot 0");
      else if (m1.valid) check(survivor == m1, "survivor slot 1");
      if (m1.valid) check(bus_out == m1, "bus output");
      check(ovf_keeps == ((m0.valid && int'(m0.d) + RL <= TL) || (m1.valid && int'(m1.d) + RL <= TL)),
            "overflow keep flag");
      // pick a legal command
      {init, extend, bcast, recv, ovf, udf, trunc} = '0;
      c = $urandom_range(0, 6);
      if (c == 2 && !is_cong) c = 1;
      if (c == 3 && !is_empty) c = 1;
      n_cmd[c]++;
      case (c)
        0: begin
          init = 1;
          m0 = '0; m0.valid = 1; m1 = '0;
        end
        1: begin
          extend = 1;
          child0 = rnd_path($urandom_range(0, 2) != 0);
          child1 = rnd_path($urandom_range(0, 2) != 0);
          m0 = child0; m1 = child1;
        end
        2: begin
          bcast = 1;
          m1.valid = 0;
        end
        3: begin
          recv = 1;
          bus_in = rnd_path(1);
          m0 = bus_in;
        end
        4: begin
          ovf = 1;
          m0.d += dist_t'(RL); m0.valid = m0.valid && (int'(m0.d) <= TL);
          m1.d += dist_t'(RL); m1.valid = m1.valid && (int'(m1.d) <= TL);
        end
        5: begin
          udf = 1;
          m0.d = (m0.d > dist_t'(RL)) ? m0.d - dist_t'(RL) : '0;
          m1.d = (m1.d > dist_t'(RL)) ? m1.d - dist_t'(RL) : '0;
        end
        default: begin
          trunc = 1;
          m1.valid = 0;
        end
      endcase
      @(negedge clk);
    end
    foreach (n_cmd[i]) check(n_cmd[i] > 0, "every command used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
