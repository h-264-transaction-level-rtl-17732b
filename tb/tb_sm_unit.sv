// tb_sm_unit: every tap value -32..31 against signed multiplication, on
// random and extreme samples.
module tb_sm_unit;
  import pred_pkg::*;
  sa_data_t x;
  coef_t    tap;
  sa_acc_t  p;
  int checks = 0, failures = 0;

  sm_unit dut (.x, .tap, .p);

  initial begin
    for (int t = -32; t < 32; t++) begin
      for (int k = 0; k < 40; k++) begin
        tap = coef_t'(t);
        case (k)
          0: x = 16'sd0;
          1: x = 16'sd255;
          2: x = -16'sd2550;
          3: x = 16'sd10710;
          4: x = 16'sh7fff;
          5: x = 16'sh8000;
          default: x = sa_data_t'($urandom);
        endcase
        #1;
        checks++;
        if (int'(p) != int'(x) * t) begin
          failures++;
          if (failures < 10) $display("tap %0d x %0d: got %0d", t, x, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
