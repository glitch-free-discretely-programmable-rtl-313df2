`timescale 1ps/1ps
// tb_mutex: checks the mutual-exclusion element.
// Directed cases (one request, overlapping requests in both orders,
// simultaneous requests) and a random four-phase workload on both sides.
// Rules checked at every change: the grants are never high together, a
// grant is only high while its request is, and a request is granted as soon
// as the other side is idle.
module tb_mutex;
  logic r_a, r_b, g_a, g_b;
  int checks = 0, failures = 0;

  mutex dut (.r_a(r_a), .r_b(r_b), .g_a(g_a), .g_b(g_b));

  task automatic expect_g(input logic ea, input logic eb, input string what);
    #5;
    checks++;
    if (g_a !== ea || g_b !== eb) begin
      failures++;
      $display("FAIL @%0t %s: g_a=%b g_b=%b expected %b %b", $time, what, g_a, g_b, ea, eb);
    end
  endtask

  always @(g_a or g_b or r_a or r_b) begin
    #0;
    checks++;
    if ((g_a && g_b) || (g_a && !r_a) || (g_b && !r_b)) begin
      failures++;
      $display("FAIL @%0t: r=%b%b g=%b%b", $time, r_a, r_b, g_a, g_b);
    end
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r_a = 0; r_b = 0;
    expect_g(0, 0, "idle");
    r_a = 1;  expect_g(1, 0, "a alone");
    r_a = 0;  expect_g(0, 0, "a released");
    r_b = 1;  expect_g(0, 1, "b alone");
    r_a = 1;  expect_g(0, 1, "a waits for b");
    r_b = 0;  expect_g(1, 0, "a granted after b");
    r_b = 1;  expect_g(1, 0, "b waits for a");
    r_a = 0;  expect_g(0, 1, "b granted after a");
    r_b = 0;  expect_g(0, 0, "idle again");
    r_a = 1; r_b = 1; expect_g(1, 0, "simultaneous");
    r_a = 0;  expect_g(0, 1, "loser granted");
    r_b = 0;  expect_g(0, 0, "idle");
    // Random four-phase traffic on both sides.
    fork
      repeat (100) begin
        #($urandom_range(1, 50)); r_a = 1;
        wait (g_a); #($urandom_range(1, 30)); r_a = 0;
      end
      repeat (100) begin
        #($urandom_range(1, 50)); r_b = 1;
        wait (g_b); #($urandom_range(1, 30)); r_b = 0;
      end
    join
    #10;
    expect_g(0, 0, "idle after traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
