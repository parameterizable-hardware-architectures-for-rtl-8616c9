// tb_passive_pe: drives random neighbour pixels and shift commands into a
// passive element and checks the register against a model: hold, or take
// the right, left or lower neighbour's pixel.
module automatic tb_passive_pe;
  import me_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  shift_e     shift;
  logic [7:0] fr, fl, fb, s, model;
  int checks = 0, failures = 0;

  passive_pe dut (.clk, .rst_n, .shift, .s_from_right(fr), .s_from_left(fl),
                  .s_from_below(fb), .s);

  initial begin
    shift = SH_HOLD; fr = '0; fl = '0; fb = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    model = '0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      checks = checks + 1;
      if (s !== model) begin
        failures = failures + 1;
        $display("FAIL: t=%0d s=%0d exp %0d", t, s, model);
      end
      shift = shift_e'($urandom_range(3));
      fr = 8'($urandom_range(255));
      fl = 8'($urandom_range(255));
      fb = 8'($urandom_range(255));
      case (shift)
        SH_LEFT:  model = fr;
        SH_RIGHT: model = fl;
        SH_UP:    model = fb;
        default:  ;
      endcase
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
