// imem_secure: instruction memory of one packet processing unit, with a
// protected copy of the program for fast recovery.
//
// The program is held three times: a golden copy that only the trusted loader
// writes (it stands for the secure storage of the memory initialisation file)
// and two working banks. The processor fetches from the active working bank
// and, through its data port, can write into it; this write path is what an
// attack uses to change the code. When the monitor detects an attack it
// pulses `recover`: the active bank is marked dirty, the other bank becomes
// active in the same cycle, and a background copy rewrites every dirty bank
// from the golden copy, one word per cycle. While the active bank is still
// dirty (a second attack during a reload) fetches are served from the golden
// copy, so the processor never executes code that was not loaded.
//
// Fetch: rd_addr in cycle t, rd_data in cycle t+1 (block RAM timing).
// The loader writes the golden copy and both banks at once.
//
// Following the design description: switch to a backup memory at once, then
// reload the infected memory from the initialisation file, and switch back on
// the next attack. Own choices: three copies, the golden-copy fallback and the
// one-word-per-cycle reload.
module imem_secure #(
  parameter int unsigned IDX_W = 9      // 512 instruction words
) (
  input  logic             clk,
  input  logic             rst_n,
  // fetch port
  input  logic [IDX_W-1:0] rd_addr,
  output logic [31:0]      rd_data,
  // processor write port (normally unused by a correct program)
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_addr,
  input  logic [31:0]      wr_data,
  // trusted loader
  input  logic             ld_we,
  input  logic [IDX_W-1:0] ld_addr,
  input  logic [31:0]      ld_data,
  // recovery
  input  logic             recover,
  output logic             active_bank,
  output logic             reloading,
  output logic [15:0]      reload_count     // completed reloads
);

  logic [31:0] golden [2**IDX_W];
  logic [31:0] bank0  [2**IDX_W];
  logic [31:0] bank1  [2**IDX_W];

  logic [1:0]       dirty;
  logic [IDX_W-1:0] copy_idx;
  logic [31:0]      copy_word;
  logic [1:0]       copy_dst;       // banks written by the word in copy_word
  logic [IDX_W-1:0] copy_wr_idx;
  logic             copy_wr;

  // golden copy: loader write, fetch read and background copy read
  logic [31:0] gold_q, bank0_q, bank1_q;
  logic        src_gold_q, src_bank1_q;

  always_ff @(posedge clk) begin
    if (ld_we) golden[ld_addr] <= ld_data;
    gold_q    <= golden[rd_addr];
    copy_word <= golden[copy_idx];
  end

  always_ff @(posedge clk) begin
    if (ld_we) bank0[ld_addr] <= ld_data;
    else if (copy_wr && copy_dst[0]) bank0[copy_wr_idx] <= copy_word;
    else if (wr_en && !active_bank) bank0[wr_addr] <= wr_data;
    bank0_q <= bank0[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (ld_we) bank1[ld_addr] <= ld_data;
    else if (copy_wr && copy_dst[1]) bank1[copy_wr_idx] <= copy_word;
    else if (wr_en && active_bank) bank1[wr_addr] <= wr_data;
    bank1_q <= bank1[rd_addr];
  end

  // bank selection and background reload
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_bank  <= 1'b0;
      dirty        <= 2'b00;
      reloading    <= 1'b0;
      copy_idx     <= '0;
      copy_wr      <= 1'b0;
      copy_dst     <= 2'b00;
      copy_wr_idx  <= '0;
      reload_count <= '0;
      src_gold_q   <= 1'b0;
      src_bank1_q  <= 1'b0;
    end else begin
      src_gold_q  <= dirty[active_bank];
      src_bank1_q <= active_bank;
      // the word read from the golden copy last cycle is written this cycle
      copy_wr     <= reloading;
      copy_wr_idx <= copy_idx;
      if (recover) begin
        // switch away from the infected bank and restart the reload
        dirty[active_bank] <= 1'b1;
        copy_dst           <= dirty | (2'b01 << active_bank);
        active_bank        <= ~active_bank;
        reloading          <= 1'b1;
        copy_idx           <= '0;
        copy_wr            <= 1'b0;
      end else if (reloading) begin
        copy_idx <= copy_idx + 1'b1;
        if (copy_idx == '1) begin
          reloading <= 1'b0;
        end
      end else if (copy_wr) begin
        // last word written this cycle: the banks are clean again
        dirty        <= 2'b00;
        copy_dst     <= 2'b00;
        reload_count <= reload_count + 16'd1;
      end
    end
  end

  assign rd_data = src_gold_q ? gold_q : (src_bank1_q ? bank1_q : bank0_q);

  // the loader only runs while no reload is in progress
  a_load_quiet: assert property (@(posedge clk) disable iff (!rst_n) ld_we |-> !reloading);

endmodule
