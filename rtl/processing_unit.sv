// processing_unit: fractal coder for one 32 x 32-pixel image sector.
//
// The sector is held in four sub-sector register banks (image_sector_bank,
// 16 x 16 pixels each). Four fractal coding modules work in parallel, each on
// the range blocks (2 x 2 pixels, 8 x 8 of them) of its own sub-sector; all
// four receive the same domain block (4 x 4 pixels, chessboard down-sampled
// to 8), which may straddle sub-sectors. A sector pixel address is split by
// sector_addr_decoder into the sub-sector and the relative position in it.
// pu_controller runs each range/domain pair through the 90-cycle schedule
// and steers the single pixel input of every coding module: its own bank's
// range port in PH_RANGE, the shared domain bus in PH_DOMAIN.
//
// Use: write the sector with enable_input_data / in_addr {row,col} /
// input_data, optionally mark range zones already coded at a coarser level in
// the covered map (cover_we / cover_addr {row,col} of the 16 x 16 range grid /
// cover_bit), set level_threshold to the level's contrast threshold U_i
// (255 at the finest level) and pulse `start`. After 1,296,000 cycles `done`
// pulses. For every range position the four codes leave on output_data, one
// per cycle with enable_output_data, during the four PH_XFER cycles of its
// last domain: 256 codes per sector. Loads while busy are a protocol error
// (asserted).
// The bank/decoder/coding-module structure follows the architecture; the
// covered map, the port protocol and the output order are this design's.
module processing_unit
  import fic_pkg::*;
#(
  parameter int SECTOR_PIX = 32,
  localparam int CW  = $clog2(SECTOR_PIX),
  localparam int RW  = CW - 1,
  localparam int RIW = RW - 1,
  localparam int NUM_FCM = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable_input_data,
  input  logic [2*CW-1:0]  in_addr,
  input  logic [PIX_W-1:0] input_data,
  input  logic             cover_we,
  input  logic [2*RW-1:0]  cover_addr,
  input  logic             cover_bit,
  input  logic [7:0]       level_threshold,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             enable_output_data,
  output pu_code_t         output_data
);

  fcm_cmd_t          cmd;
  logic [RIW-1:0]    rng_row, rng_col;
  logic [DPOS_W-1:0] dom_row, dom_col;
  logic [2*RW-1:0]   rng_rel, in_rel, dom_rel;
  logic [CW-1:0]     dom_row_pix, dom_col_pix;
  logic [1:0]        dom_sub;
  logic [3:0]        in_sel;
  logic [PIX_W-1:0]  rng_data [NUM_FCM];
  logic [PIX_W-1:0]  dom_data [NUM_FCM];
  logic [PIX_W-1:0]  dom_bus;
  fcm_code_t         code [NUM_FCM];
  logic [(1<<RW)-1:0] covered [1<<RW];   // [range row][range col] in the sector

  pu_controller #(.SECTOR_PIX(SECTOR_PIX)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .busy        (busy),
    .done        (done),
    .cmd         (cmd),
    .rng_row     (rng_row),
    .rng_col     (rng_col),
    .dom_row     (dom_row),
    .dom_col     (dom_col),
    .rng_rel     (rng_rel),
    .dom_row_pix (dom_row_pix),
    .dom_col_pix (dom_col_pix)
  );

  // Write path: decode the loaded pixel's address.
  sector_addr_decoder #(.SECTOR_PIX(SECTOR_PIX)) u_in_dec (
    .row     (in_addr[2*CW-1:CW]),
    .col     (in_addr[CW-1:0]),
    .sub     (),
    .sub_sel (in_sel),
    .rel     (in_rel)
  );

  // Domain path: decode the pixel the controller asks for.
  sector_addr_decoder #(.SECTOR_PIX(SECTOR_PIX)) u_dom_dec (
    .row     (dom_row_pix),
    .col     (dom_col_pix),
    .sub     (dom_sub),
    .sub_sel (),
    .rel     (dom_rel)
  );

  assign dom_bus = dom_data[dom_sub];

  always_ff @(posedge clk) begin
    if (cover_we) covered[cover_addr[2*RW-1:RW]][cover_addr[RW-1:0]] <= cover_bit;
  end

  for (genvar k = 0; k < NUM_FCM; k++) begin : g_sub
    logic [PIX_W-1:0] pix_in;
    logic             cov;

    image_sector_bank #(.SUB_PIX(SECTOR_PIX / 2)) u_bank (
      .clk      (clk),
      .we       (enable_input_data && in_sel[k]),
      .waddr    (in_rel),
      .wdata    (input_data),
      .rng_addr (rng_rel),
      .rng_data (rng_data[k]),
      .dom_addr (dom_rel),
      .dom_data (dom_data[k])
    );

    assign pix_in = (cmd.phase == PH_RANGE) ? rng_data[k] : dom_bus;
    assign cov    = covered[{k[1], rng_row}][{k[0], rng_col}];

    fractal_coding_module u_fcm (
      .clk       (clk),
      .rst_n     (rst_n),
      .cmd       (cmd),
      .pix_in    (pix_in),
      .dom_row   (dom_row),
      .dom_col   (dom_col),
      .threshold (level_threshold),
      .covered   (cov),
      .code      (code[k])
    );
  end

  // Fractal parameter transfer: module `step` drives the output in PH_XFER.
  always_comb begin
    enable_output_data    = (cmd.phase == PH_XFER) && cmd.last_dom;
    output_data.fcm       = cmd.step[1:0];
    output_data.range_idx = 6'({rng_row, rng_col});
    output_data.code      = code[cmd.step[1:0]];
  end

  // The sector and the covered map must not change while they are being coded.
  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !enable_input_data && !cover_we);

endmodule
