// Six pixel converter daughter boards on one router bus.
//
// Each board holds the events of one half stave. With all boards sharing one
// bus, the router address grows by three bits: addr[21:19] selects the half
// stave (board), addr[18:0] is the board's own address (event memory,
// control word 0/1, flush, test/run). A strobe reaches only the selected
// board. Read data returns one cycle after the read strobe with rvalid; the
// data of the board that was read is selected. A read of a half stave with
// no board (BOARDS..7) returns 0 with rvalid. Each board keeps its own
// event-ready interrupt line, irq[b].
//
// Link side: board b receives the words of its half stave on
// lk_valid[b]/lk_ready[b]/lk_data[b]/lk_last[b] with per-word parity and
// format error flags, and its board status inputs (link ready, single event
// upset, pixel control error, temperature high).
//
// The six boards and the half stave select in bits 21..19 follow the
// interface definition, which offers the shared address space as an option
// for routers that share the event memories of all half staves; this design
// takes that option. The reply for an absent half stave is this design's
// choice.
module pc_array
  import pc_pkg::*;
#(
  parameter int unsigned BOARDS = BOARDS_D,
  parameter int unsigned MEM_AW = MEM_AW_D,
  parameter int unsigned EVENTS = EVENTS_D
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // router bus
  input  logic                           strobe,
  input  logic                           wr,
  input  logic [HS_AW+CONV_AW-1:0]       addr,
  input  logic [DATA_W-1:0]              wdata,
  output logic [DATA_W-1:0]              rdata,
  output logic                           rvalid,
  output logic [BOARDS-1:0]              irq,
  // link receivers, one per board
  input  logic [BOARDS-1:0]              lk_valid,
  output logic [BOARDS-1:0]              lk_ready,
  input  logic [BOARDS-1:0][DATA_W-1:0]  lk_data,
  input  logic [BOARDS-1:0]              lk_last,
  input  logic [BOARDS-1:0]              lk_parity_err,
  input  logic [BOARDS-1:0]              lk_format_err,
  // board status, one per board
  input  logic [BOARDS-1:0]              link_ready,
  input  logic [BOARDS-1:0]              seu_err,
  input  logic [BOARDS-1:0]              pixel_ctrl_err,
  input  logic [BOARDS-1:0]              temp_high
);

  logic [HS_AW-1:0]             hs;
  logic [BOARDS-1:0]            b_strobe, b_rvalid;
  logic [BOARDS-1:0][DATA_W-1:0] b_rdata;
  logic                         absent_q;

  assign hs = addr[HS_AW+CONV_AW-1 -: HS_AW];

  for (genvar b = 0; b < BOARDS; b++) begin : g_board
    assign b_strobe[b] = strobe && (int'(hs) == b);

    pixel_converter #(.MEM_AW(MEM_AW), .EVENTS(EVENTS)) u_pc (
      .clk, .rst_n,
      .strobe         (b_strobe[b]),
      .wr,
      .addr           (addr[CONV_AW-1:0]),
      .wdata,
      .rdata          (b_rdata[b]),
      .rvalid         (b_rvalid[b]),
      .irq            (irq[b]),
      .lk_valid       (lk_valid[b]),
      .lk_ready       (lk_ready[b]),
      .lk_data        (lk_data[b]),
      .lk_last        (lk_last[b]),
      .lk_parity_err  (lk_parity_err[b]),
      .lk_format_err  (lk_format_err[b]),
      .link_ready     (link_ready[b]),
      .seu_err        (seu_err[b]),
      .pixel_ctrl_err (pixel_ctrl_err[b]),
      .temp_high      (temp_high[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) absent_q <= 1'b0;
    else        absent_q <= strobe && !wr && (int'(hs) >= BOARDS);
  end

  always_comb begin
    rdata  = '0;
    rvalid = absent_q;
    for (int b = 0; b < BOARDS; b++) begin
      if (b_rvalid[b]) begin
        rdata  = b_rdata[b];
        rvalid = 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({absent_q, b_rvalid}));

endmodule
