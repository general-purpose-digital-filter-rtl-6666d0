// tb_spi_master -- checks the SPI master in all four modes.
//
// A 32-bit, two-slave master talks to a behavioural slave written here from
// the SPI mode definitions: the slave samples MOSI on its sampling edges and
// changes MISO on its launching edges. For every combination of cpol, cpha,
// clk_div (1 and 3) and slave address, random words go both ways; the test
// checks the word the slave received, rx_data, that only the addressed slave
// was selected, the idle clock level, and that busy lasts exactly
// (2*32+1)*clk_div + 1 cycles. Continuous mode is checked the same way with
// three words in one selection: the slave must see one unbroken stream of
// 96 bits, busy must drop for exactly one cycle after each of the first two
// words with that word on rx_data, and the whole transfer must take
// (2*96+1)*clk_div + 1 cycles.
module tb_spi_master;

  localparam int D = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0, cpol = 1'b0, cpha = 1'b0, cont = 1'b0;
  logic [15:0] clk_div = 16'd1;
  logic [31:0] addr = '0;
  logic [D-1:0] tx_data = '0;
  logic miso, sclk, mosi, busy;
  logic [1:0] ss_n;
  logic [D-1:0] rx_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spi_master #(.SLAVES(2), .D_WIDTH(D)) dut (
    .clk, .rst_n, .enable, .cpol, .cpha, .cont, .clk_div, .addr, .tx_data, .miso,
    .sclk, .ss_n, .mosi, .busy, .rx_data
  );

  // behavioural slave, selected by either slave-select line. It sends the
  // words s_tx_q[0], s_tx_q[1], ... as one bit stream and collects every D
  // received bits into s_rx_q.
  localparam int NW = 3;
  logic [D-1:0] s_tx_q [NW];
  logic [D-1:0] s_rx_q [$];
  logic [D-1:0] s_rx;
  int           s_pos, s_bits;
  logic         sel;
  assign sel = (ss_n != 2'b11);

  function automatic logic s_bit(int p);
    return (p < NW * D) ? s_tx_q[p / D][D - 1 - (p % D)] : 1'b0;
  endfunction

  initial begin
    miso = 1'b0; s_pos = 0; s_bits = 0; s_rx = '0;
    foreach (s_tx_q[i]) s_tx_q[i] = '0;
  end

  always @(negedge sel or posedge sel) begin
    if (sel) begin
      s_bits = 0;
      s_pos  = 0;
      s_rx_q.delete();
      if (!cpha) begin miso = s_bit(0); s_pos = 1; end
    end
  end

  always @(sclk) if (sel) begin
    bit leading;
    leading = (sclk != cpol);
    if (leading == !cpha) begin
      s_rx = {s_rx[D-2:0], mosi};
      s_bits++;
      if (s_bits % D == 0) s_rx_q.push_back(s_rx);
    end else begin
      miso = s_bit(s_pos);
      s_pos++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic transfer(logic pol, logic pha, int div, int a);
    int cycles;
    logic [D-1:0] word;
    cpol = pol; cpha = pha; clk_div = 16'(div); addr = 32'(a);
    word = {$urandom, $urandom};
    tx_data = word;
    foreach (s_tx_q[i]) s_tx_q[i] = {$urandom, $urandom};
    @(negedge clk);
    check(sclk == pol, "idle clock level");
    enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    cycles = 1;
    check(busy == 1'b1, "busy after start");
    check(ss_n == ((a == 1) ? 2'b01 : 2'b10), $sformatf("slave select %b for addr %0d", ss_n, a));
    while (busy) begin
      @(negedge clk);
      cycles++;
      if (busy) check(ss_n == ((a == 1) ? 2'b01 : 2'b10), "slave select held");
    end
    check(cycles == (2 * D + 1) * div + 1,
          $sformatf("busy %0d cycles, mode %0d%0d div %0d", cycles, pol, pha, div));
    check(ss_n == 2'b11, "deselected at end");
    check(s_bits == D, $sformatf("slave clocked %0d bits", s_bits));
    check(s_rx_q.size() == 1 && s_rx_q[0] == word,
          $sformatf("slave got %h, sent %h (mode %0d%0d)", s_rx, word, pol, pha));
    check(rx_data == s_tx_q[0],
          $sformatf("master got %h, slave sent %h (mode %0d%0d)", rx_data, s_tx_q[0], pol, pha));
    repeat (3) @(negedge clk);
  endtask

  // NW words in one selection, continuous mode
  task automatic stream(logic pol, logic pha, int div, int a);
    int cycles, k, low;
    logic [D-1:0] words [NW];
    cpol = pol; cpha = pha; clk_div = 16'(div); addr = 32'(a);
    foreach (words[i]) words[i] = {$urandom, $urandom};
    foreach (s_tx_q[i]) s_tx_q[i] = {$urandom, $urandom};
    tx_data = words[0];
    cont = 1'b1;
    @(negedge clk);
    enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    tx_data = words[1];
    cycles = 1;
    k = 0;
    low = 0;
    while (ss_n != 2'b11) begin
      @(negedge clk);
      cycles++;
      if (ss_n != 2'b11) begin
        check(ss_n == ((a == 1) ? 2'b01 : 2'b10), "slave select held in stream");
        if (!busy) begin
          low++;
          if (low == 1) begin
            check(k < NW - 1, "too many word hand-overs");
            check(rx_data == s_tx_q[k],
                  $sformatf("stream word %0d: master got %h, slave sent %h (mode %0d%0d div %0d)",
                            k, rx_data, s_tx_q[k], pol, pha, div));
            k++;
            if (k < NW - 1) tx_data = words[k + 1];
            else            cont = 1'b0;
          end
        end else begin
          if (low != 0) check(low == 1, $sformatf("busy low for %0d cycles", low));
          low = 0;
        end
      end
    end
    check(k == NW - 1, $sformatf("%0d word hand-overs in stream", k));
    check(busy == 1'b0, "idle after stream");
    check(cycles == (2 * D * NW + 1) * div + 1,
          $sformatf("stream took %0d cycles, mode %0d%0d div %0d", cycles, pol, pha, div));
    check(s_bits == NW * D, $sformatf("slave clocked %0d bits in stream", s_bits));
    check(s_rx_q.size() == NW, "slave word count in stream");
    for (int i = 0; i < NW && i < s_rx_q.size(); i++)
      check(s_rx_q[i] == words[i], $sformatf("stream word %0d: slave got %h, sent %h", i, s_rx_q[i], words[i]));
    check(rx_data == s_tx_q[NW - 1], "last stream word on rx_data");
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int rep = 0; rep < 4; rep++)
      for (int m = 0; m < 4; m++)
        for (int dv = 1; dv <= 3; dv += 2)
          transfer(m[1], m[0], dv, rep % 2);
    for (int rep = 0; rep < 2; rep++)
      for (int m = 0; m < 4; m++)
        for (int dv = 1; dv <= 3; dv += 2)
          stream(m[1], m[0], dv, rep % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
