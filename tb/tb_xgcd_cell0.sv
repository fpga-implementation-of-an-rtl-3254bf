// tb_xgcd_cell0 -- unit test of the rightmost processor P0.
//
// The bench loads random operand bits and tags, drives random bits from the
// left neighbour and a run enable that is mostly on, and keeps its own model of
// P0: the decision table on (a0, b0, a1 = b1), the alternation of decision and
// wait cycles, the cofactor updates (integer sums with no carry in, 0 shifted
// in), the sign wave and the termination test b = 0 with tag 1. After every
// clock it compares the command, u', v', ct, cw, fin, a, sa, t and w. It also
// checks that P0 never issues two commands on consecutive clocks, and that each
// decision (B, C, S, plus, minus, termination) was taken at least once.
module tb_xgcd_cell0;
  import xgcd_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      load = 1'b0, load_a = 1'b0, load_b = 1'b0, load_ta = 1'b0, load_tb = 1'b0;
  logic      run = 1'b0;
  opd_link_t from_left;
  cmd_link_t to_left;
  logic      fin, a_o, sa_o, t_o, w_o;

  int checks = 0, failures = 0;
  int n_dec [6];   // B, C, S, plus, minus, fin
  state_e prev_s;

  xgcd_cell0 dut (.*);

  always #5ns clk = ~clk;

  state_e m_s;
  logic   m_fin, m_a, m_b, m_ta, m_tb, m_sa, m_u, m_v, m_t, m_w, m_ct, m_cw, m_up, m_vp;

  task automatic model_init(input logic la, input logic lb, input logic lta, input logic ltb);
    m_s = ST_W; m_fin = 0; m_a = la; m_b = lb; m_ta = lta; m_tb = ltb; m_sa = 0;
    m_u = 1; m_v = 0; m_t = 0; m_w = 1; m_ct = 0; m_cw = 0; m_up = 0; m_vp = 0;
  endtask

  task automatic model_step();
    int r;
    logic ou, ov, ot, ow, ob, ota, otb;
    if (load) begin
      model_init(load_a, load_b, load_ta, load_tb);
      return;
    end
    m_sa = from_left.ta ? from_left.a : from_left.sa;
    ou = m_u; ov = m_v; ot = m_t; ow = m_w; ob = m_b; ota = m_ta; otb = m_tb;
    if (m_s != ST_W) begin
      case (m_s)
        ST_C: begin
          m_u = 0; m_t = ou; m_up = ot; m_v = 0; m_w = ov; m_vp = ow;
        end
        ST_S: begin
          m_u = 0; m_up = ou; m_v = 0; m_vp = ov;
        end
        ST_B: ;
        default: begin
          m_u = 0; m_up = ot; m_v = 0; m_vp = ow;
          if (m_s == ST_MINUS0 || m_s == ST_MINUS1) begin
            r = int'(ou) - int'(ot); m_t = r[0]; m_ct = (r < 0);
            r = int'(ov) - int'(ow); m_w = r[0]; m_cw = (r < 0);
          end else begin
            r = int'(ou) + int'(ot); m_t = r[0]; m_ct = (r > 1);
            r = int'(ov) + int'(ow); m_w = r[0]; m_cw = (r > 1);
          end
        end
      endcase
      m_s = ST_W;
    end else if (run && !m_fin) begin
      if (m_b == 0 && m_tb == 1) begin
        m_fin = 1; n_dec[5]++;
      end else if (m_a == 0 && m_b == 0) begin
        m_s = ST_B; m_a = from_left.a; m_b = from_left.b;
        m_ta = from_left.ta; m_tb = from_left.tb; n_dec[0]++;
      end else if (m_a == 0) begin
        m_s = ST_C; m_a = ob; m_ta = otb; m_b = from_left.a; m_tb = from_left.ta; n_dec[1]++;
      end else if (m_b == 0) begin
        m_s = ST_S; m_b = from_left.b; m_tb = from_left.tb; n_dec[2]++;
      end else begin
        // a+b: bit 0 carries, bit 1 is 1+0+1 -> carry 1 into bit 2
        // a-b: bit 0 no borrow, bit 1 equal -> borrow 0 into bit 2
        if (from_left.a != from_left.b) begin
          m_s = ST_PLUS1; n_dec[3]++;
        end else begin
          m_s = ST_MINUS0; n_dec[4]++;
        end
        m_a = ob; m_ta = otb; m_b = 0; m_tb = ota & otb;
      end
    end
  endtask

  task automatic compare();
    checks++;
    if (to_left.s != m_s || to_left.up != m_up || to_left.vp != m_vp ||
        to_left.ct != m_ct || to_left.cw != m_cw || fin != m_fin ||
        a_o != m_a || sa_o != m_sa || t_o != m_t || w_o != m_w) begin
      failures++;
      if (failures < 10)
        $display("FAIL cycle %0d: dut s=%s fin=%b a=%b t=%b w=%b ct=%b | model s=%s fin=%b a=%b t=%b w=%b ct=%b",
                 checks, to_left.s.name(), fin, a_o, t_o, w_o, to_left.ct,
                 m_s.name(), m_fin, m_a, m_t, m_w, m_ct);
    end
    // P0 must separate two commands by a wait cycle
    checks++;
    if (prev_s != ST_W && to_left.s != ST_W) begin
      failures++;
      $display("FAIL two commands in a row");
    end
    prev_s = to_left.s;
  endtask

  initial begin
    from_left = '0;
    prev_s = ST_W;
    foreach (n_dec[i]) n_dec[i] = 0;
    model_init(0, 0, 1, 1);
    repeat (2) @(posedge clk);
    #1ns rst_n = 1'b1;
    compare();
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      load    = ($urandom_range(0, 19) == 0);
      load_a  = 1'($urandom); load_b = 1'($urandom);
      load_ta = 1'($urandom); load_tb = ($urandom_range(0, 3) == 0);
      run     = ($urandom_range(0, 7) != 0);
      from_left = opd_link_t'(5'($urandom));
      model_step();
      @(posedge clk);
      #1ns compare();
    end
    foreach (n_dec[i]) begin
      checks++;
      if (n_dec[i] == 0) begin
        failures++;
        $display("FAIL decision %0d never taken", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
