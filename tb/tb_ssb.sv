// tb_ssb: checks the state buffer. The three write ports (upper-plane
// column, SP result and MR/CU result) write random values to random slots
// and columns, often in the same clock, and all read arrays are compared with
// a model after every clock.
`timescale 1ns/1ps
module tb_ssb;
  import jp2k_pkg::*;
  localparam int NC = 32, NSLOT = 4;
  logic clk = 0;
  logic up_we = 0, sp_we = 0, cu_we = 0;
  logic [1:0] up_slot, sp_slot, cu_slot;
  logic [4:0] up_col, sp_col, cu_col;
  col_item_t up_item;
  cstate_t [3:0] sp_st, cu_st;
  logic [3:0] sp_pd1, sp_v;
  cstate_t [3:0] up_q [NSLOT][NC], sp_q [NSLOT][NC], cu_q [NSLOT][NC];
  logic [3:0] sgn_q [NSLOT][NC], pd1_q [NSLOT][NC], v_q [NSLOT][NC];
  logic [7:0] m_up [NSLOT][NC], m_sp [NSLOT][NC], m_cu [NSLOT][NC];
  logic [3:0] m_sgn [NSLOT][NC], m_pd1 [NSLOT][NC], m_v [NSLOT][NC];
  int checks = 0, failures = 0;

  ssb #(.NC(NC), .NSLOT(NSLOT)) dut (.*);
  always #5 clk = ~clk;

  task automatic do_write(bit all_ports, int sl, int col);
    @(negedge clk);
    up_we = all_ports || ($urandom % 2); sp_we = all_ports || ($urandom % 2); cu_we = all_ports || ($urandom % 2);
    up_slot = all_ports ? 2'(sl) : 2'($urandom); up_col = all_ports ? 5'(col) : 5'($urandom);
    sp_slot = all_ports ? 2'(sl) : 2'($urandom); sp_col = all_ports ? 5'(col) : 5'($urandom);
    cu_slot = all_ports ? 2'(sl) : 2'($urandom); cu_col = all_ports ? 5'(col) : 5'($urandom);
    up_item = col_item_t'($urandom); sp_st = 8'($urandom); cu_st = 8'($urandom);
    sp_pd1 = 4'($urandom); sp_v = 4'($urandom);
    @(posedge clk);
    if (up_we) begin m_up[up_slot][up_col] = up_item.st; m_sgn[up_slot][up_col] = up_item.sgn; end
    if (sp_we) begin m_sp[sp_slot][sp_col] = sp_st; m_pd1[sp_slot][sp_col] = sp_pd1; m_v[sp_slot][sp_col] = sp_v; end
    if (cu_we) m_cu[cu_slot][cu_col] = cu_st;
  endtask

  task automatic compare();
    #1;
    for (int sl = 0; sl < NSLOT; sl++)
      for (int x = 0; x < NC; x++) begin
        checks++;
        if (up_q[sl][x] != m_up[sl][x] || sgn_q[sl][x] != m_sgn[sl][x] || sp_q[sl][x] != m_sp[sl][x] ||
            pd1_q[sl][x] != m_pd1[sl][x] || v_q[sl][x] != m_v[sl][x] || cu_q[sl][x] != m_cu[sl][x])
          failures++;
      end
  endtask

  initial begin
    for (int sl = 0; sl < NSLOT; sl++)
      for (int x = 0; x < NC; x++) do_write(1, sl, x);
    compare();
    for (int i = 0; i < 3000; i++) begin
      do_write(0, 0, 0);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
