// tb_isolation_cell -- self-checking test of the isolation clamp.
//
// With isolation off the output follows random inputs; with isolation on it
// holds the clamp pattern (here a mix of bits tied high and low) whatever the
// input does.
module tb_isolation_cell;
  localparam int unsigned W = 12;
  localparam logic [W-1:0] CLAMP = 12'hA50;

  logic clk = 1'b0;
  logic iso_en;
  logic [W-1:0] in, out;
  int checks = 0, failures = 0;

  isolation_cell #(.W(W), .CLAMP(CLAMP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      iso_en = ($urandom_range(0, 1) == 1);
      in = 12'($urandom);
      #1;
      checks++;
      if (out !== (iso_en ? CLAMP : in)) begin
        failures++;
        $display("FAIL iso=%b in=%h out=%h", iso_en, in, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
