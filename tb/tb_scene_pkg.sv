// tb_scene_pkg: builds the byte stream that uploads the test scene over the
// serial line, in the model memory's format (index entries of 5 bytes,
// position/normal/material entries of 12 bytes, least significant byte
// first, each list closed by an all-ones stop word).
// Scene, drawn in this order:
//   triangle 0: small green triangle at z = 2 covering the screen centre
//   triangles 1..12: cube from -1 to 1, one material per face, front face
//                    (+z) coloured (1, 0.5, 0.25); faces wound outwards
//   triangle 13: triangle at z = 5, behind a camera at z = 4: clipped
// With the camera at (0,0,4) looking down -z, the screen centre shows the
// green triangle (it is nearer than the cube, which is drawn afterwards and
// loses the depth test there), (192,120) shows the cube's front face and
// (110,120) shows the background.
package tb_scene_pkg;
  import tb_fp_pkg::*;

  localparam int NUM_TRI = 14;
  localparam logic [11:0] RGB_TRI  = 12'h0D0;   // floor(15*0.9018) on green
  localparam logic [11:0] RGB_CUBE = 12'hD63;   // 15*0.9018*(1, .5, .25)
  localparam logic [11:0] RGB_BG   = 12'h000;

  function automatic void push_word(ref byte unsigned q[$], input logic [95:0] w, input int nb);
    for (int i = 0; i < nb; i++) q.push_back(w[8*i +: 8]);
  endfunction

  function automatic logic [95:0] v3(input real x, input real y, input real z);
    return {r2f(x), r2f(y), r2f(z)};   // x in the top word, as in fvec3_t
  endfunction

  function automatic void build(ref byte unsigned q[$]);
    real pos [$];
    int  idx [$];          // triples: position, normal, material
    real nrm [7][3];
    real mat [7][3];
    int  np;
    // normals: faces +x -x +y -y +z -z, then the triangle's normal
    nrm = '{'{1.0, 0.0, 0.0}, '{-1.0, 0.0, 0.0}, '{0.0, 1.0, 0.0}, '{0.0, -1.0, 0.0},
            '{0.0, 0.0, 1.0}, '{0.0, 0.0, -1.0}, '{0.0, 0.0, 1.0}};
    mat = '{'{0.2, 0.2, 1.0}, '{0.2, 1.0, 0.2}, '{1.0, 1.0, 0.0}, '{0.0, 1.0, 1.0},
            '{1.0, 0.5, 0.25}, '{1.0, 0.0, 1.0}, '{0.0, 1.0, 0.0}};
    // triangle 0
    pos = '{-0.3, -0.3, 2.0, 0.3, -0.3, 2.0, 0.0, 0.3, 2.0};
    idx = '{0, 6, 6, 1, 6, 6, 2, 6, 6};
    np = 3;
    // cube faces
    for (int f = 0; f < 6; f++) begin
      int ax, u, v;
      real s, c [4][3];
      ax = f / 2; s = (f % 2 == 0) ? 1.0 : -1.0;
      u = (ax + 1) % 3; v = (ax + 2) % 3;
      // corners in order around the face, counter-clockwise seen from outside
      for (int k = 0; k < 4; k++) begin
        real cu, cv;
        cu = (k == 0 || k == 3) ? -1.0 : 1.0;
        cv = (k < 2) ? -1.0 : 1.0;
        if (s < 0) cv = -cv;
        c[k][ax] = s; c[k][u] = cu; c[k][v] = cv;
      end
      for (int k = 0; k < 4; k++) for (int j = 0; j < 3; j++) pos.push_back(c[k][j]);
      idx.push_back(np + 0); idx.push_back(f); idx.push_back(f);
      idx.push_back(np + 1); idx.push_back(f); idx.push_back(f);
      idx.push_back(np + 2); idx.push_back(f); idx.push_back(f);
      idx.push_back(np + 0); idx.push_back(f); idx.push_back(f);
      idx.push_back(np + 2); idx.push_back(f); idx.push_back(f);
      idx.push_back(np + 3); idx.push_back(f); idx.push_back(f);
      np += 4;
    end
    // triangle behind the camera
    pos.push_back(0.0); pos.push_back(0.0); pos.push_back(5.0);
    pos.push_back(1.0); pos.push_back(0.0); pos.push_back(5.0);
    pos.push_back(0.0); pos.push_back(1.0); pos.push_back(5.0);
    for (int k = 0; k < 3; k++) begin
      idx.push_back(np + k); idx.push_back(6); idx.push_back(6);
    end
    np += 3;
    // index list
    for (int i = 0; i < idx.size(); i += 3)
      push_word(q, 96'({12'(idx[i+2]), 12'(idx[i+1]), 12'(idx[i])}), 5);
    push_word(q, '1, 5);
    for (int i = 0; i < pos.size(); i += 3) push_word(q, v3(pos[i], pos[i+1], pos[i+2]), 12);
    push_word(q, '1, 12);
    for (int i = 0; i < 7; i++) push_word(q, v3(nrm[i][0], nrm[i][1], nrm[i][2]), 12);
    push_word(q, '1, 12);
    for (int i = 0; i < 7; i++) push_word(q, v3(mat[i][0], mat[i][1], mat[i][2]), 12);
    push_word(q, '1, 12);
  endfunction
endpackage
