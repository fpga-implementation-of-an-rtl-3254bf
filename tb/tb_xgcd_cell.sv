// tb_xgcd_cell -- unit test of one generic processor P_i.
//
// The bench drives random commands (half of them wait), random left-neighbour
// operand bits and right-neighbour cofactor bits, and occasional loads, and
// keeps its own model of all sixteen registers of the cell. The model does the
// one-bit additions and subtractions as integer sums and differences rather than
// gate equations. After every clock all outputs (command with its carry, u', v',
// ct, cw, a, b, ta, tb, sa, t, w) are compared with the model.
module tb_xgcd_cell;
  import xgcd_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      load = 1'b0, load_a = 1'b0, load_b = 1'b0, load_ta = 1'b0, load_tb = 1'b0;
  cmd_link_t from_right;
  opd_link_t from_left;
  cmd_link_t to_left;
  opd_link_t to_right;
  logic      t_o, w_o;

  int checks = 0, failures = 0;
  int n_pm = 0, n_wait_pm = 0;

  xgcd_cell dut (.*);

  always #5ns clk = ~clk;

  // model registers
  state_e m_s;
  logic   m_a, m_b, m_ta, m_tb, m_sa, m_u, m_v, m_t, m_w, m_ct, m_cw, m_up, m_vp;

  task automatic model_reset();
    m_s = ST_W; m_a = 0; m_b = 0; m_ta = 1; m_tb = 1; m_sa = 0;
    m_u = 0; m_v = 0; m_t = 0; m_w = 0; m_ct = 0; m_cw = 0; m_up = 0; m_vp = 0;
  endtask

  task automatic model_step();
    int r, c;
    logic minus, ou, ov, ot, ow, ob, ota, otb;
    if (load) begin
      model_reset();
      m_a = load_a; m_b = load_b; m_ta = load_ta; m_tb = load_tb;
      return;
    end
    m_sa = from_left.ta ? from_left.a : from_left.sa;
    ou = m_u; ov = m_v; ot = m_t; ow = m_w; ob = m_b; ota = m_ta; otb = m_tb;
    if (from_right.s == ST_W) begin
      case (m_s)
        ST_C: begin
          m_u = from_right.up; m_t = ou; m_up = ot;
          m_v = from_right.vp; m_w = ov; m_vp = ow;
        end
        ST_S: begin
          m_u = from_right.up; m_up = ou;
          m_v = from_right.vp; m_vp = ov;
        end
        ST_PLUS0, ST_PLUS1, ST_MINUS0, ST_MINUS1: begin
          minus = (m_s == ST_MINUS0 || m_s == ST_MINUS1);
          m_u = from_right.up; m_up = ot;
          m_v = from_right.vp; m_vp = ow;
          r = minus ? int'(ou) - int'(ot) - int'(from_right.ct)
                    : int'(ou) + int'(ot) + int'(from_right.ct);
          m_t = r[0]; m_ct = minus ? (r < 0) : (r > 1);
          r = minus ? int'(ov) - int'(ow) - int'(from_right.cw)
                    : int'(ov) + int'(ow) + int'(from_right.cw);
          m_w = r[0]; m_cw = minus ? (r < 0) : (r > 1);
          n_wait_pm++;
        end
        default: ;
      endcase
      m_s = ST_W;
    end else begin
      m_s = from_right.s;
      case (from_right.s)
        ST_B: begin
          m_a = from_left.a; m_b = from_left.b; m_ta = from_left.ta; m_tb = from_left.tb;
        end
        ST_C: begin
          m_a = ob; m_ta = otb; m_b = from_left.a; m_tb = from_left.ta;
        end
        ST_S: begin
          m_b = from_left.b; m_tb = from_left.tb;
        end
        default: begin
          minus = (from_right.s == ST_MINUS0 || from_right.s == ST_MINUS1);
          c = (from_right.s == ST_PLUS1 || from_right.s == ST_MINUS1) ? 1 : 0;
          r = minus ? int'(from_left.a) - int'(from_left.b) - c
                    : int'(from_left.a) + int'(from_left.b) + c;
          m_a = ob; m_ta = otb; m_b = r[0]; m_tb = ota & otb;
          if (minus) m_s = (r < 0) ? ST_MINUS1 : ST_MINUS0;
          else       m_s = (r > 1) ? ST_PLUS1 : ST_PLUS0;
          n_pm++;
        end
      endcase
    end
  endtask

  task automatic compare();
    checks++;
    if (to_left.s != m_s || to_left.up != m_up || to_left.vp != m_vp ||
        to_left.ct != m_ct || to_left.cw != m_cw ||
        to_right.a != m_a || to_right.b != m_b || to_right.ta != m_ta ||
        to_right.tb != m_tb || to_right.sa != m_sa || t_o != m_t || w_o != m_w) begin
      failures++;
      if (failures < 10)
        $display("FAIL cycle %0d: dut s=%s up=%b ct=%b t=%b w=%b a=%b b=%b tb=%b | model s=%s up=%b ct=%b t=%b w=%b a=%b b=%b tb=%b",
                 checks, to_left.s.name(), to_left.up, to_left.ct, t_o, w_o, to_right.a,
                 to_right.b, to_right.tb, m_s.name(), m_up, m_ct, m_t, m_w, m_a, m_b, m_tb);
    end
  endtask

  initial begin
    from_right = '{s: ST_W, up: 0, vp: 0, ct: 0, cw: 0};
    from_left  = '0;
    model_reset();
    repeat (2) @(posedge clk);
    #1ns rst_n = 1'b1;
    compare();
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      load    = ($urandom_range(0, 39) == 0);
      load_a  = 1'($urandom); load_b = 1'($urandom);
      load_ta = 1'($urandom); load_tb = 1'($urandom);
      // a command is always followed by a wait, as in the array; sometimes more
      if (from_right.s != ST_W || $urandom_range(0, 3) == 0)
        from_right.s = ST_W;
      else
        from_right.s = state_e'(3'($urandom_range(1, 7)));
      from_right.up = 1'($urandom); from_right.vp = 1'($urandom);
      from_right.ct = 1'($urandom); from_right.cw = 1'($urandom);
      from_left = opd_link_t'(5'($urandom));
      model_step();
      @(posedge clk);
      #1ns compare();
    end
    checks++;
    if (n_pm == 0 || n_wait_pm == 0) failures++;
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
