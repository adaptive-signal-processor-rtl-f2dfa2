// tc_loader: microprogram loader of the test controller.
//
// The loader memory (1K words x 29 bits in the document, an EPROM) holds, for
// every bus cycle of a download, the data word and the dataway control values
// to put on the system bus. It is divided into 4 pages of 256 words; two
// switches select the page. An 8-bit address counter steps through the page,
// one word per system clock cycle. A download starts when `start` is pressed
// while the loader mode switch `mode_en` is on, and ends after the word whose
// DLS (down load stop) bit is set has been executed.
//
// Word layout (bit 28 = MSB), built from the document's downloader words:
//   [28:13] data word D0..D15
//   [12:8]  system address (word 3, D0..D4)
//   [7]     ADEN (word 3, D5)     [6] CPEN (word 3, D6)
//   [5]     not used (word 3, D7)
//   [4:1]   OP code (word 4, D0..D3)
//   [0]     DLS (word 4, D4)
// The memory holds the built-in download of asp_program_pkg (page 0; other
// pages empty). A non-empty INIT_FILE replaces it ($readmemh, one 29-bit word
// per line, page p at lines 256p..256p+255), e.g. for a test image.
//
// Timing: `start` is synchronised and edge detected; the counter and the
// active flag change on the T4 strobe `commit`, so every word is on the bus
// for one full cycle. `active` tells the test controller to give the dataway
// to the loader.
module tc_loader
  import asp_pkg::*;
#(
  parameter int unsigned PAGES     = 4,
  parameter int unsigned PAGE_SIZE = 256,
  parameter string       INIT_FILE = ""
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         commit,
  input  logic [$clog2(PAGES)-1:0]     page_sel,
  input  logic                         mode_en,
  input  logic                         start,
  output logic                         active,
  output dw_ctrl_t                     dw,
  output logic [DW-1:0]                data
);

  localparam int unsigned PW = $clog2(PAGES);
  localparam int unsigned CW = $clog2(PAGE_SIZE);

  logic [28:0]   rom [PAGES*PAGE_SIZE];
  logic [28:0]   word;
  logic [CW-1:0] cnt;
  logic [PW-1:0] page;
  logic [2:0]    start_sync;
  logic          pending;

  // pages not present in the file read as zero words
  initial begin
    for (int i = 0; i < PAGES*PAGE_SIZE; i++)
      rom[i] = (INIT_FILE == "") ? asp_program_pkg::loader_word(i / PAGE_SIZE, i % PAGE_SIZE) : '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign word    = rom[{page, cnt}];
  assign data    = word[28:13];
  assign dw.addr = word[12:8];
  assign dw.aden = word[7];
  assign dw.cpen = word[6];
  assign dw.op   = word[4:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start_sync <= '0;
    else        start_sync <= {start_sync[1:0], start};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      pending <= 1'b0;
      cnt     <= '0;
      page    <= '0;
    end else begin
      if (start_sync[1] && !start_sync[2] && mode_en && !active)
        pending <= 1'b1;
      if (commit) begin
        if (pending) begin
          // begin at a cycle boundary so the first word gets a whole cycle
          pending <= 1'b0;
          active  <= 1'b1;
          cnt     <= '0;
          page    <= page_sel;
        end else if (active) begin
          if (word[0]) active <= 1'b0;
          else         cnt    <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
