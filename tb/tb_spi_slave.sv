// tb_spi_slave: acts as an SPI mode-0 host. Sends random bytes and checks
// that each arrives once, in order, on rx_valid/rx_byte. The core side
// answers every received byte b with b ^ 8'h5A on tx_byte; the host
// checks that the answer to the byte of slot j comes back in slot j+2,
// and that the first byte of a frame is 0x00. A frame cut off after three
// bits must leave no trace in the next frame. The frames run at SCK
// frequencies from a quarter of the core clock up to 5/3 of it, the
// last one near the link's limit of about twice the core clock.
module tb_spi_slave;
  logic clk = 0, rst_n = 1;
  logic spi_sck = 0, spi_cs_n = 0, spi_mosi = 0, spi_miso;
  logic rx_valid;
  logic [7:0] rx_byte, tx_byte;
  int checks = 0, failures = 0;
  logic [7:0] got [$];

  int half = 20;  // SCK half period; core clock period is 10
  int halves [4] = '{20, 7, 4, 3};

  always #5 clk = !clk;

  spi_slave dut (.*);

  // core side: echo, and collect
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx_byte <= 8'h00;
    else if (rx_valid) begin
      tx_byte <= rx_byte ^ 8'h5A;
      got.push_back(rx_byte);
    end
  end

  task automatic xfer(input logic [7:0] d, output logic [7:0] q, input int nbits = 8);
    for (int i = 7; i >= 8 - nbits; i--) begin
      spi_mosi = d[i];
      #half spi_sck = 1;
      q[i] = spi_miso;
      #half spi_sck = 0;
    end
  endtask

  initial begin
    logic [7:0] sent [$], back [$];
    logic [7:0] d, q;
    int base;
    // reset and chip select edges clear the SCK-domain registers, which
    // see no SCK edge during reset
    #1 rst_n = 0;
    #1 spi_cs_n = 1;
    #28 rst_n = 1;
    #50;
    // a frame broken off after 3 bits
    spi_cs_n = 0; #half;
    xfer(8'hFF, q, 3);
    #half spi_cs_n = 1; #(4*half);
    for (int f = 0; f < 4; f++) begin
      half = halves[f];
      base = sent.size();
      spi_cs_n = 0; #half;
      for (int j = 0; j < 24; j++) begin
        d = 8'($urandom);
        xfer(d, q);
        sent.push_back(d);
        back.push_back(q);
      end
      #half spi_cs_n = 1; #(4*half);
      checks++;
      if (back[base] !== 8'h00) begin failures++; $display("FAIL first byte %h", back[base]); end
      for (int j = 2; j < 24; j++) begin
        checks++;
        if (back[base+j] !== (sent[base+j-2] ^ 8'h5A)) begin
          failures++; $display("FAIL miso slot %0d: %h exp %h", j, back[base+j], sent[base+j-2] ^ 8'h5A);
        end
      end
    end
    #200;
    checks++;
    if (got.size() != sent.size()) begin failures++; $display("FAIL %0d bytes, sent %0d", got.size(), sent.size()); end
    for (int j = 0; j < sent.size() && j < got.size(); j++) begin
      checks++;
      if (got[j] !== sent[j]) begin failures++; $display("FAIL rx %0d: %h exp %h", j, got[j], sent[j]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
