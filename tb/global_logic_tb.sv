// global_logic_tb: self-checking test of the frame receiver at full size
// (8 blocks, 16 columns, 2184-bit frames).
//
// The testbench builds frames of random 16-bit stimulator words, appends a
// CRC8 computed here bit by bit from the polynomial, and sends them one bit
// per clock. It keeps its own model of the 8 scan chains (256-bit shift
// registers driven by sdata/shift_en/chain_clr) and at every load compares
// each chain with the words it sent: D0 is shifted first and so sits at the
// far end, bits [255:240], and column k's word in bits [16(15-k)+15:16(15-k)]. It checks that back-to-back frames load exactly 2184 cycles
// apart (one 109.2 us time step at 20 MHz), that the tick follows each load by
// one cycle and is periodic while no frame arrives, that a corrupted bit
// discards the frame (CRC error, chains cleared, zero load) and that the next
// frame, preceded by idle bits, is found again.
module global_logic_tb;
  import epi_pkg::*;

  localparam int NB = 8, NC = 16, FR = 8 + NC * (NB * 16 + 8);

  logic clk = 0, rst_n = 0, rx_data = 0;
  logic [NB-1:0] sdata;
  logic shift_en, chain_clr, load, tick, frame_ok, crc_err;
  int checks = 0, failures = 0;

  global_logic dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Scan chain model and load snapshots.
  logic [NB-1:0][NC*16-1:0] chain, snap;
  int n_load = 0, n_ok = 0, n_err = 0, n_tick = 0;
  longint cyc = 0, last_load = -1, last_tick = -1;
  int load_gap [$];
  int tick_gap [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (chain_clr) chain <= '0;
      else if (shift_en) for (int b = 0; b < NB; b++) chain[b] <= {chain[b][NC*16-2:0], sdata[b]};
      if (load) begin
        snap <= chain;
        n_load++;
        if (last_load >= 0) load_gap.push_back(int'(cyc - last_load));
        last_load <= cyc;
      end
      if (frame_ok) n_ok++;
      if (crc_err) n_err++;
      if (tick) begin
        n_tick++;
        check(last_load < 0 || cyc - last_load == 1 || cyc - last_tick == FR, "tick after load or periodic");
        last_tick <= cyc;
      end
    end
  end

  function automatic logic [7:0] crc_ref(input logic [NB*16-1:0] d);
    logic [7:0] r;
    r = 8'h00;
    for (int i = NB * 16 - 1; i >= 0; i--) begin
      if (r[7] ^ d[i]) r = (r << 1) ^ 8'h07;
      else             r = r << 1;
    end
    return r;
  endfunction

  logic [15:0] words [NC][NB];
  logic [15:0] exp_words [NC][NB];

  task automatic send_bit(input logic b);
    rx_data <= b;
    @(posedge clk);
  endtask

  task automatic send_frame(input int corrupt_col);
    logic [NB*16-1:0] dx;
    logic [7:0] crc;
    for (int i = 7; i >= 0; i--) send_bit(HEADER[i]);
    for (int x = 0; x < NC; x++) begin
      for (int b = 0; b < NB; b++) dx[(NB-1-b)*16 +: 16] = words[x][b];
      crc = crc_ref(dx);
      if (x == corrupt_col) dx[37] = ~dx[37];
      for (int i = NB * 16 - 1; i >= 0; i--) send_bit(dx[i]);
      for (int i = 7; i >= 0; i--) send_bit(crc[i]);
    end
  endtask

  task automatic new_words();
    for (int x = 0; x < NC; x++) for (int b = 0; b < NB; b++) words[x][b] = 16'($urandom);
  endtask

  task automatic check_snapshot(input string tag);
    logic [15:0] w [NC][NB];
    repeat (3) @(posedge clk);
    w = exp_words;
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < NC; k++)
        check(snap[b][16*(NC-1-k) +: 16] == w[k][b], $sformatf("%s block %0d col %0d", tag, b, k));
  endtask

  initial begin
    int loads_before;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) send_bit(1'b0);

    // Three back-to-back good frames, each checked after its load.
    for (int f = 0; f < 3; f++) begin
      new_words();
      send_frame(-1);
      loads_before = n_load;
      exp_words = words;
      if (f == 2) begin
        // last frame: wait for its load before sending anything else
        while (n_load == loads_before) send_bit(1'b0);
      end else begin
        fork
          begin
            while (n_load == loads_before) @(posedge clk);
            check_snapshot($sformatf("frame %0d", f));
          end
        join_none
      end
    end
    check_snapshot("frame 2");
    check(n_ok == 3 && n_err == 0, "three good frames");
    check(load_gap.size() == 2 && load_gap[0] == FR && load_gap[1] == FR, "frame period 2184 cycles");

    // Free-running tick with no frames.
    repeat (3 * FR) send_bit(1'b0);
    check(n_tick >= 5, "tick keeps running without frames");

    // Corrupted frame: discarded, chains cleared, zero load.
    new_words();
    loads_before = n_load;
    send_frame(NC - 1);
    repeat (4) send_bit(1'b0);
    check(n_err == 1, "crc error flagged");
    check(n_load == loads_before + 1, "error produces one load");
    check(snap == '0, "stimulators receive zero input after error");

    // Resynchronise on the next header after idle bits, mid-stream.
    for (int i = 0; i < 13; i++) send_bit(i[0]);
    new_words();
    loads_before = n_load;
    send_frame(-1);
    exp_words = words;
    while (n_load == loads_before) send_bit(1'b1);
    check_snapshot("after resync");
    check(n_ok == 4, "resync frame accepted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
