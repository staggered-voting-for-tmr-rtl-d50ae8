// tb_majority_voter: exhaustive self-checking test of the 2-of-3 voter.
//
// Applies all eight input combinations with no defect and compares the
// output with a population count (high when two or more inputs are high),
// then checks that both stuck-at defects override every combination.
module tb_majority_voter;
  import svtmr_pkg::*;

  logic [NMR-1:0] in;
  defect_t        defect;
  logic           y;

  int checks = 0;
  int failures = 0;

  majority_voter dut (.in(in), .defect(defect), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int d = 0; d < 3; d++) begin
      case (d)
        0: defect = NO_DEFECT;
        1: defect = '{stuck: 1'b1, value: 1'b0};
        default: defect = '{stuck: 1'b1, value: 1'b1};
      endcase
      for (int v = 0; v < 8; v++) begin
        in = 3'(v);
        #1;
        if (d == 0) exp = ($countones(in) >= 2);
        else        exp = defect.value;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL in=%b defect=%p: y=%b expected %b", in, defect, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
