// tb_aes_ttable_rom: reads all 256 entries through every port (each port
// at a different offset) and checks them one cycle later against
// {2*S, S, S, 3*S} built from the reference S-box, plus a few published
// S-box values.
module tb_aes_ttable_rom;
  import aes_ref_pkg::*;
  localparam int NPORTS = 12;

  logic clk = 0;
  logic [7:0]  addr [NPORTS];
  logic [31:0] data [NPORTS];
  int checks = 0, failures = 0;
  logic [7:0] sref [256];

  always #5 clk = !clk;

  aes_ttable_rom dut (.*);

  initial begin
    logic [7:0] x, s;
    for (int i = 0; i < 256; i++) sref[i] = sb(8'(i));
    // published values: S(00)=63, S(01)=7c, S(53)=ed, S(ff)=16
    checks++;
    if (sref[8'h00] != 8'h63 || sref[8'h01] != 8'h7c || sref[8'h53] != 8'hed || sref[8'hff] != 8'h16) begin
      failures++; $display("FAIL reference S-box");
    end
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      for (int p = 0; p < NPORTS; p++) addr[p] = 8'(i + 37 * p);
      @(negedge clk);
      for (int p = 0; p < NPORTS; p++) begin
        x = 8'(i + 37 * p);
        s = sref[x];
        checks++;
        if (data[p] !== {gm(s, 2), s, s, gm(s, 3)}) begin
          failures++; $display("FAIL port %0d addr %h: %h", p, x, data[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
