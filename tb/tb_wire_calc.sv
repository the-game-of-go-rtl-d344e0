// tb_wire_calc: exhaustive check of the wire rule over every pair of cell
// values and every pattern of the six neighbouring wires.
module tb_wire_calc;
  import go_pkg::*;
  cell_t      cell_a, cell_b;
  logic [5:0] nbr;
  logic       hot;
  int checks = 0, failures = 0;

  wire_calc dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        for (int n = 0; n < 64; n++) begin
          logic exp;
          cell_a = cell_t'(a);
          cell_b = cell_t'(b);
          nbr    = 6'(n);
          #1;
          if (a == 0 || b == 0) exp = 1;
          else if (a != b)      exp = 0;
          else                  exp = (n != 0);
          checks++;
          if (hot !== exp) begin
            failures++;
            $display("FAIL a=%0d b=%0d nbr=%b hot=%b", a, b, n, hot);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
