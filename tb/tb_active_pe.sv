// tb_active_pe: checks the four parts of an active element against a
// model: the search register follows the shift command, the running
// reference register follows r_shift, the standing register copies it on
// r_load, and the carry-save output equals the incoming partial sum plus
// |search - standing reference|.
module automatic tb_active_pe;
  import me_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  shift_e     shift;
  logic [7:0] fr, fl, fb, s, rfb, r_run, r;
  logic       r_shift, r_load;
  logic [7:0] si, so;
  logic [6:0] cdi, cdo;
  logic [3:0] cui, cuo;
  logic [7:0] m_s, m_run, m_r;
  int checks = 0, failures = 0;

  active_pe dut (.clk, .rst_n, .shift, .s_from_right(fr), .s_from_left(fl),
    .s_from_below(fb), .s, .r_shift, .r_from_below(rfb), .r_run, .r_load, .r,
    .acc_s_in(si), .acc_cd_in(cdi), .acc_cu_in(cui),
    .acc_s_out(so), .acc_cd_out(cdo), .acc_cu_out(cuo));

  task automatic check(string what, bit ok);
    checks = checks + 1;
    if (!ok) begin
      failures = failures + 1;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    shift = SH_HOLD; fr = '0; fl = '0; fb = '0; rfb = '0; r_shift = 0; r_load = 0;
    si = '0; cdi = '0; cui = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    m_s = '0; m_run = '0; m_r = '0;
    for (int t = 0; t < 500; t++) begin
      int d, inval;
      @(negedge clk);
      si  = 8'($urandom_range(255));
      cdi = 7'($urandom_range(127));
      cui = 4'($urandom_range(7));
      #1;
      d = int'(m_s) - int'(m_r);
      if (d < 0) d = -d;
      inval = int'(si) + 2*int'(cdi) + 256*int'(cui);
      check($sformatf("t=%0d s", t), s == m_s);
      check($sformatf("t=%0d r_run", t), r_run == m_run);
      check($sformatf("t=%0d r", t), r == m_r);
      check($sformatf("t=%0d acc", t),
            int'(so) + 2*int'(cdo) + 256*int'(cuo) == inval + d);
      shift   = shift_e'($urandom_range(3));
      fr = 8'($urandom_range(255)); fl = 8'($urandom_range(255)); fb = 8'($urandom_range(255));
      rfb     = 8'($urandom_range(255));
      r_shift = 1'($urandom_range(1));
      r_load  = ($urandom_range(3) == 0);
      case (shift)
        SH_LEFT:  m_s = fr;
        SH_RIGHT: m_s = fl;
        SH_UP:    m_s = fb;
        default:  ;
      endcase
      if (r_load) m_r = m_run;
      if (r_shift) m_run = rfb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures = failures + 1;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
