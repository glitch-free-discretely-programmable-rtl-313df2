`timescale 1ps/1ps
// tb_c_element: checks the Muller C-element against a reference model.
// A random walk over the inputs (one or both changing per step) is applied;
// the expected output follows the inputs when they are equal and otherwise
// keeps its previous value.
module tb_c_element;
  logic a, b, y, y_ref;
  int checks = 0, failures = 0;

  c_element dut (.a(a), .b(b), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; y_ref = 0;
    #10;
    for (int i = 0; i < 400; i++) begin
      a = 1'($urandom_range(0, 1));
      b = 1'($urandom_range(0, 1));
      if (a == b) y_ref = a;
      #10;
      checks++;
      if (y !== y_ref) begin
        failures++;
        $display("FAIL: a=%b b=%b y=%b expected %b", a, b, y, y_ref);
      end
    end
    // Explicit hold cases.
    a = 1; b = 1; #10; a = 0; #10;
    checks++; if (y !== 1'b1) begin failures++; $display("FAIL: hold high"); end
    b = 0; #10; a = 1; #10;
    checks++; if (y !== 1'b0) begin failures++; $display("FAIL: hold low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
