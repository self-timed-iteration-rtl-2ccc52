// tb_osc_check: watches a ring oscillator's stage outputs (drivers). Every
// time unit it checks that the ones form one non-empty contiguous run and
// the zeros another (around the ring); it counts output transitions per
// stage.
module tb_osc_check #(
  parameter int unsigned N = 5
) (
  input  logic         en,
  input  logic [N-1:0] y,
  output int           toggles [N],
  output int           checks,
  output int           failures
);

  logic [N-1:0] prev;

  initial begin
    checks = 0; failures = 0;
    for (int j = 0; j < N; j++) toggles[j] = 0;
    prev = '0;
    forever begin
      #1;
      if (en) begin
        automatic int edges = 0;
        for (int j = 0; j < N; j++) begin
          if (y[j] != y[(j + 1) % N]) edges++;
          if (y[j] != prev[j]) toggles[j]++;
        end
        checks++;
        if (edges != 2) begin
          failures++;
          $display("ERROR oscillator state %b breaks the crest/trough invariant at %0t", y, $time);
        end
      end
      prev = y;
    end
  end

endmodule
