// tb_bram_dual: read test of the dual-port A memory.
//
// Two instances: one with the default contents (16 down to 1) and one with a
// scrambled INIT. Random address pairs are applied every cycle; each port's
// data must equal the addressed element exactly one clock later, and must
// hold while the address is unchanged.
module tb_bram_dual;
  import mm_pkg::*;

  function automatic logic [DEPTH-1:0][A_W-1:0] scrambled();
    logic [DEPTH-1:0][A_W-1:0] m;
    for (int i = 0; i < DEPTH; i++) m[i] = A_W'((i * 7 + 3) % 17 + 1);
    return m;
  endfunction
  localparam logic [DEPTH-1:0][A_W-1:0] INIT2 = scrambled();

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic [ADDR_W-1:0] addr_a, addr_b, pa, pb;
  logic [A_W-1:0] da0, db0, da1, db1;

  always #5 clk = ~clk;

  bram_dual u_def (.clk(clk), .addr_a(addr_a), .addr_b(addr_b), .dout_a(da0), .dout_b(db0));
  bram_dual #(.INIT(INIT2)) u_scr (.clk(clk), .addr_a(addr_a), .addr_b(addr_b),
                                   .dout_a(da1), .dout_b(db1));

  task automatic check(input logic [A_W-1:0] got, input int exp_v, input string what);
    checks++;
    if (int'(got) != exp_v) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_a = '0;
    addr_b = '0;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      pa = addr_a;
      pb = addr_b;
      if (n % 5 != 4) begin  // sometimes keep the address: data must hold
        addr_a = ADDR_W'($urandom);
        addr_b = ADDR_W'($urandom);
      end
      @(negedge clk);
      // data of the address that was applied at the previous edge
      check(da0, DEPTH - int'(addr_a), "default port a");
      check(db0, DEPTH - int'(addr_b), "default port b");
      check(da1, (int'(addr_a) * 7 + 3) % 17 + 1, "scrambled port a");
      check(db1, (int'(addr_b) * 7 + 3) % 17 + 1, "scrambled port b");
    end
    // latency: change the address just after an edge, data must not follow
    addr_a = 4'd0;
    addr_b = 4'd15;
    @(negedge clk);
    addr_a = 4'd1;
    addr_b = 4'd14;
    #1;
    check(da0, 16, "port a before the edge");
    check(db0, 1, "port b before the edge");
    @(negedge clk);
    check(da0, 15, "port a after the edge");
    check(db0, 2, "port b after the edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
