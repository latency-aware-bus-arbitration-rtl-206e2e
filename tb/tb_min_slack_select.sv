// tb_min_slack_select: random test of the smallest-slack selection.
//
// Random urgent masks and slack values (including many ties and extreme
// values) are applied; the expected result is found by sorting the urgent
// masters by (slack, index) and taking the first.
module tb_min_slack_select;
  import la_pkg::*;

  localparam int N = 6;
  logic [N-1:0] urgent;
  slack_t       slack [N];
  logic         enable;
  logic [2:0]   next_id;
  int checks = 0, failures = 0;

  min_slack_select #(.N(N)) dut (.urgent, .slack, .enable, .next_id);

  initial begin
    int best, bid;
    for (int n = 0; n < 20000; n++) begin
      urgent = N'($urandom);
      for (int i = 0; i < N; i++) begin
        case ($urandom_range(0, 3))
          0: slack[i] = slack_t'(int'($urandom_range(0, 6)) - 3);    // ties
          1: slack[i] = ($urandom_range(0, 1) != 0) ? SLACK_MIN : SLACK_MAX;
          default: slack[i] = slack_t'($urandom);
        endcase
      end
      #1;
      bid = -1; best = 0;
      for (int i = 0; i < N; i++)
        if (urgent[i] && (bid < 0 || int'(slack[i]) < best)) begin
          bid = i; best = int'(slack[i]);
        end
      checks++;
      if (enable != (bid >= 0) || (bid >= 0 && int'(next_id) != bid)) begin
        failures++;
        if (failures < 10)
          $display("FAIL urgent=%b got en=%0d id=%0d exp %0d", urgent, enable, next_id, bid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
