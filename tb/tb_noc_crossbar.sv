// tb_noc_crossbar: self-checking test of the node crossbar.
//
// Applies random Router requests, random STUs and random one-hot grants and
// fire signals, and compares every output with a reference computed here:
// output o carries the data and last flag of the Router it grants, sees the
// Routers that request it, and Router i is accepted when an output that
// grants it fires.
module tb_noc_crossbar;
  import noc_pkg::*;

  logic [NDIR-1:0] rt_req    [NDIR];
  stu_t            rt_data   [NDIR];
  logic            rt_last   [NDIR];
  logic            rt_accept [NDIR];
  logic [NDIR-1:0] arb_req   [NDIR];
  logic [NDIR-1:0] arb_grant [NDIR];
  logic            arb_fire  [NDIR];
  stu_t            arb_data  [NDIR];
  logic            arb_last  [NDIR];

  int checks = 0, failures = 0;

  noc_crossbar dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
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
    for (int t = 0; t < 2000; t++) begin
      int g [NDIR];
      for (int i = 0; i < NDIR; i++) begin
        rt_req[i]  = '0;
        if ($urandom_range(0, 1)) rt_req[i][$urandom_range(0, NDIR - 1)] = 1'b1;
        rt_data[i] = $urandom();
        rt_last[i] = 1'($urandom());
      end
      for (int o = 0; o < NDIR; o++) begin
        g[o] = $urandom_range(0, NDIR);          // NDIR = no grant
        arb_grant[o] = '0;
        if (g[o] < NDIR) arb_grant[o][g[o]] = 1'b1;
        arb_fire[o] = (g[o] < NDIR) && 1'($urandom());
      end
      #1;
      for (int o = 0; o < NDIR; o++) begin
        logic [NDIR-1:0] er;
        for (int i = 0; i < NDIR; i++) er[i] = rt_req[i][o];
        check(arb_req[o] == er, $sformatf("arb_req[%0d]", o));
        check(arb_data[o] == ((g[o] < NDIR) ? rt_data[g[o]] : '0), $sformatf("arb_data[%0d]", o));
        check(arb_last[o] == ((g[o] < NDIR) ? rt_last[g[o]] : 1'b0), $sformatf("arb_last[%0d]", o));
      end
      for (int i = 0; i < NDIR; i++) begin
        bit ea;
        ea = 0;
        for (int o = 0; o < NDIR; o++) if (g[o] == i && arb_fire[o]) ea = 1;
        check(rt_accept[i] == ea, $sformatf("rt_accept[%0d]", i));
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
