// tb_comparator_cell: checks one iterative-comparator cell for every digit
// pair and every legal incoming state (undecided, X greater, X smaller).
// A decided state must pass through unchanged; an undecided one must be
// decided by the digits.
module tb_comparator_cell;
  int checks = 0, failures = 0;
  logic gi, li, x, y, go, lo;

  comparator_cell dut (.gi(gi), .li(li), .x(x), .y(y), .go(go), .lo(lo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg, el;
    for (int st = 0; st < 3; st++) begin
      for (int d = 0; d < 4; d++) begin
        {x, y} = d[1:0];
        gi = (st == 1);
        li = (st == 2);
        #1;
        if (st == 1)      begin eg = 1; el = 0; end
        else if (st == 2) begin eg = 0; el = 1; end
        else              begin eg = (x > y); el = (x < y); end
        checks++;
        if (go !== eg || lo !== el) begin
          failures++;
          $display("FAIL st=%0d x=%b y=%b go=%b lo=%b", st, x, y, go, lo);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
