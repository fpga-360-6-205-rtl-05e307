00000000
3ac90fd5
3b490fc6
3b96cbc1
3bc90f88
3bfb5330
3c16cb58
3c2fed02
3c490e90
3c622fff
3c7b514b
3c8a3938
3c96c9b6
3ca35a1c
3cafea69
3cbc7a9b
3cc90ab0
3cd59aa6
3ce22a7a
3ceeba2c
3cfb49ba
3d03ec90
3d0a342f
3d107bb8
3d16c32c
3d1d0a88
3d2351cb
3d2998f6
3d2fe007
3d3626fc
3d3c6dd5
3d42b491
3d48fb30
3d4f41af
3d55880e
3d5bce4c
3d621469
3d685a62
3d6ea038
3d74e5e9
3d7b2b74
3d80b86c
3d83db0a
3d86fd94
3d8a200a
3d8d426a
3d9064b4
3d9386e7
3d96a905
3d99cb0a
3d9cecf9
3da00ecf
3da3308c
3da65230
3da973ba
3dac952b
3dafb680
3db2d7bb
3db5f8da
3db919dd
3dbc3ac3
3dbf5b8d
3dc27c39
3dc59cc6
3dc8bd36
3dcbdd86
3dcefdb7
3dd21dc8
3dd53db9
3dd85d89
3ddb7d37
3dde9cc4
3de1bc2e
3de4db76
3de7fa9a
3deb199a
3dee3876
3df1572e
3df475c0
3df7942c
3dfab273
3dfdd092
3e007745
3e02062e
3e039502
3e0523c2
3e06b26e
3e084105
3e09cf86
3e0b5df3
3e0cec4a
3e0e7a8b
3e1008b7
3e1196cc
3e1324ca
3e14b2b2
3e164083
3e17ce3d
3e195be0
3e1ae96b
3e1c76de
3e1e0438
3e1f917b
3e211ea5
3e22abb6
3e2438ad
3e25c58c
3e275251
3e28defc
3e2a6b8d
3e2bf804
3e2d8461
3e2f10a2
3e309cc9
3e3228d4
3e33b4c4
3e354098
3e36cc50
3e3857ec
3e39e36c
3e3b6ecf
3e3cfa15
3e3e853e
3e401049
3e419b37
3e432607
3e44b0b9
3e463b4d
3e47c5c2
3e495018
3e4ada4f
3e4c6467
3e4dee60
3e4f7838
3e5101f1
3e528b89
3e541501
3e559e58
3e57278f
3e58b0a4
3e5a3997
3e5bc26a
3e5d4b1a
3e5ed3a8
3e605c13
3e61e45c
3e636c83
3e64f486
3e667c66
3e680422
3e698bba
3e6b132f
3e6c9a7f
3e6e21ab
3e6fa8b2
3e712f94
3e72b651
3e743ce8
3e75c35a
3e7749a6
3e78cfcc
3e7a55cb
3e7bdba4
3e7d6156
3e7ee6e1
3e803622
3e80f8c0
3e81bb4a
3e827dc0
3e834022
3e840270
3e84c4aa
3e8586ce
3e8648df
3e870ada
3e87ccc1
3e888e93
3e895050
3e8a11f7
3e8ad38a
3e8b9507
3e8c566e
3e8d17c0
3e8dd8fc
3e8e9a22
3e8f5b32
3e901c2c
3e90dd10
3e919ddd
3e925e94
3e931f35
3e93dfbf
3e94a031
3e95608d
3e9620d2
3e96e100
3e97a117
3e986116
3e9920fe
3e99e0ce
3e9aa086
3e9b6027
3e9c1faf
3e9cdf20
3e9d9e78
3e9e5db8
3e9f1cdf
3e9fdbee
3ea09ae5
3ea159c2
3ea21887
3ea2d733
3ea395c5
3ea4543f
3ea5129f
3ea5d0e5
3ea68f12
3ea74d25
3ea80b1f
3ea8c8fe
3ea986c4
3eaa446f
3eab0201
3eabbf77
3eac7cd4
3ead3a15
3eadf73c
3eaeb449
3eaf713a
3eb02e10
3eb0eacb
3eb1a76b
3eb263ef
3eb32058
3eb3dca5
3eb498d6
3eb554ec
3eb610e6
3eb6ccc3
3eb78884
3eb8442a
3eb8ffb2
3eb9bb1e
3eba766e
3ebb31a0
3ebbecb6
3ebca7af
3ebd628b
3ebe1d4a
3ebed7eb
3ebf926f
3ec04cd5
3ec1071e
3ec1c148
3ec27b55
3ec33544
3ec3ef15
3ec4a8c8
3ec5625c
3ec61bd2
3ec6d529
3ec78e62
3ec8477c
3ec90077
3ec9b953
3eca7210
3ecb2aae
3ecbe32c
3ecc9b8b
3ecd53ca
3ece0bea
3ecec3ea
3ecf7bca
3ed0338a
3ed0eb2a
3ed1a2aa
3ed25a09
3ed31148
3ed3c867
3ed47f64
3ed53641
3ed5ecfd
3ed6a399
3ed75a13
3ed8106b
3ed8c6a3
3ed97cb9
3eda32ad
3edae880
3edb9e31
3edc53c1
3edd092e
3eddbe79
3ede73a2
3edf28a9
3edfdd8d
3ee0924f
3ee146ee
3ee1fb6a
3ee2afc4
3ee363fa
3ee4180e
3ee4cbfe
3ee57fcb
3ee63375
3ee6e6fb
3ee79a5d
3ee84d9c
3ee900b7
3ee9b3ae
3eea6681
3eeb1930
3eebcbbb
3eec7e21
3eed3063
3eede280
3eee9479
3eef464c
3eeff7fb
3ef0a985
3ef15aea
3ef20c29
3ef2bd43
3ef36e38
3ef41f07
3ef4cfb1
3ef58035
3ef63093
3ef6e0cb
3ef790dc
3ef840c8
3ef8f08e
3ef9a02d
3efa4fa5
3efafef7
3efbae22
3efc5d27
3efd0c04
3efdbabb
3efe694a
3eff17b2
3effc5f3
3f003a06
3f0090ff
3f00e7e4
3f013eb5
3f019573
3f01ec1c
3f0242b1
3f029932
3f02ef9f
3f0345f8
3f039c3d
3f03f26d
3f044889
3f049e91
3f04f484
3f054a62
3f05a02c
3f05f5e2
3f064b82
3f06a10e
3f06f686
3f074be8
3f07a136
3f07f66f
3f084b92
3f08a0a1
3f08f59b
3f094a7f
3f099f4e
3f09f409
3f0a48ad
3f0a9d3d
3f0af1b7
3f0b461c
3f0b9a6b
3f0beea5
3f0c42c9
3f0c96d7
3f0cead0
3f0d3eb3
3f0d9281
3f0de638
3f0e39da
3f0e8d65
3f0ee0db
3f0f343b
3f0f8784
3f0fdab8
3f102dd5
3f1080dc
3f10d3cd
3f1126a7
3f11796b
3f11cc19
3f121eb0
3f127130
3f12c39a
3f1315ee
3f13682a
3f13ba50
3f140c5f
3f145e58
3f14b039
3f150204
3f1553b7
3f15a554
3f15f6d9
3f164847
3f16999f
3f16eade
3f173c07
3f178d18
3f17de12
3f182ef5
3f187fc0
3f18d073
3f19210f
3f197194
3f19c200
3f1a1255
3f1a6293
3f1ab2b8
3f1b02c6
3f1b52bb
3f1ba299
3f1bf25f
3f1c420c
3f1c91a2
3f1ce11f
3f1d3084
3f1d7fd1
3f1dcf06
3f1e1e22
3f1e6d26
3f1ebc12
3f1f0ae5
3f1f599f
3f1fa841
3f1ff6cb
3f20453b
3f209393
3f20e1d2
3f212ff9
3f217e06
3f21cbfb
3f2219d7
3f226799
3f22b543
3f2302d3
3f23504b
3f239da9
3f23eaee
3f24381a
3f24852c
3f24d225
3f251f04
3f256bcb
3f25b877
3f26050a
3f265184
3f269de3
3f26ea2a
3f273656
3f278268
3f27ce61
3f281a40
3f286605
3f28b1b0
3f28fd41
3f2948b8
3f299415
3f29df57
3f2a2a80
3f2a758e
3f2ac082
3f2b0b5b
3f2b561b
3f2ba0bf
3f2beb4a
3f2c35b9
3f2c800f
3f2cca49
3f2d1469
3f2d5e6f
3f2da859
3f2df229
3f2e3bde
3f2e8578
3f2ecef7
3f2f185b
3f2f61a5
3f2faad3
3f2ff3e6
3f303cde
3f3085bb
3f30ce7c
3f311722
3f315fad
3f31a81d
3f31f071
3f3238aa
3f3280c7
3f32c8c9
3f3310af
3f33587a
3f33a029
3f33e7bc
3f342f34
3f34768f
3f34bdcf
3f3504f3
3f354bfb
3f3592e7
3f35d9b8
3f36206c
3f366704
3f36ad7f
3f36f3df
3f373a23
3f37804a
3f37c655
3f380c43
3f385216
3f3897cb
3f38dd65
3f3922e1
3f396842
3f39ad85
3f39f2ac
3f3a37b7
3f3a7ca4
3f3ac175
3f3b0629
3f3b4ac1
3f3b8f3b
3f3bd398
3f3c17d9
3f3c5bfc
3f3ca003
3f3ce3ec
3f3d27b8
3f3d6b67
3f3daef9
3f3df26e
3f3e35c5
3f3e78ff
3f3ebc1b
3f3eff1b
3f3f41fc
3f3f84c0
3f3fc767
3f4009f0
3f404c5c
3f408ea9
3f40d0da
3f4112ec
3f4154e1
3f4196b7
3f41d870
3f421a0b
3f425b89
3f429ce8
3f42de29
3f431f4c
3f436051
3f43a138
3f43e200
3f4422ab
3f446337
3f44a3a5
3f44e3f5
3f452426
3f456439
3f45a42d
3f45e403
3f4623bb
3f466354
3f46a2ce
3f46e22a
3f472167
3f476085
3f479f84
3f47de65
3f481d27
3f485bca
3f489a4e
3f48d8b3
3f4916fa
3f495521
3f499329
3f49d112
3f4a0edc
3f4a4c87
3f4a8a13
3f4ac77f
3f4b04cc
3f4b41fa
3f4b7f09
3f4bbbf8
3f4bf8c7
3f4c3578
3f4c7208
3f4cae79
3f4ceacb
3f4d26fd
3f4d6310
3f4d9f02
3f4ddad5
3f4e1689
3f4e521c
3f4e8d90
3f4ec8e4
3f4f0417
3f4f3f2b
3f4f7a1f
3f4fb4f4
3f4fefa8
3f502a3b
3f5064af
3f509f03
3f50d937
3f51134a
3f514d3d
3f518710
3f51c0c2
3f51fa54
3f5233c6
3f526d18
3f52a649
3f52df59
3f531849
3f535118
3f5389c7
3f53c255
3f53fac3
3f54330f
3f546b3b
3f54a347
3f54db31
3f5512fb
3f554aa4
3f55822c
3f55b993
3f55f0d9
3f5627fe
3f565f02
3f5695e5
3f56cca7
3f570348
3f5739c7
3f577026
3f57a663
3f57dc7f
3f581279
3f584853
3f587e0b
3f58b3a1
3f58e916
3f591e6a
3f59539c
3f5988ad
3f59bd9c
3f59f26a
3f5a2716
3f5a5ba0
3f5a9009
3f5ac450
3f5af875
3f5b2c79
3f5b605a
3f5b941a
3f5bc7b8
3f5bfb34
3f5c2e8e
3f5c61c7
3f5c94dd
3f5cc7d1
3f5cfaa3
3f5d2d53
3f5d5fe1
3f5d924d
3f5dc497
3f5df6be
3f5e28c3
3f5e5aa6
3f5e8c67
3f5ebe05
3f5eef81
3f5f20db
3f5f5212
3f5f8327
3f5fb419
3f5fe4e9
3f601596
3f604621
3f607689
3f60a6cf
3f60d6f2
3f6106f2
3f6136d0
3f61668a
3f619622
3f61c598
3f61f4ea
3f62241a
3f625326
3f628210
3f62b0d7
3f62df7b
3f630dfc
3f633c5a
3f636a95
3f6398ac
3f63c6a1
3f63f473
3f642221
3f644fac
3f647d14
3f64aa59
3f64d77b
3f650479
3f653154
3f655e0b
3f658aa0
3f65b710
3f65e35e
3f660f88
3f663b8e
3f666771
3f669330
3f66becc
3f66ea45
3f671599
3f6740ca
3f676bd8
3f6796c1
3f67c187
3f67ec29
3f6816a8
3f684103
3f686b39
3f68954c
3f68bf3c
3f68e907
3f6912ae
3f693c32
3f696591
3f698ecc
3f69b7e4
3f69e0d7
3f6a09a7
3f6a3252
3f6a5ad9
3f6a833c
3f6aab7b
3f6ad395
3f6afb8c
3f6b235e
3f6b4b0c
3f6b7295
3f6b99fb
3f6bc13b
3f6be858
3f6c0f50
3f6c3624
3f6c5cd4
3f6c835e
3f6ca9c5
3f6cd007
3f6cf624
3f6d1c1d
3f6d41f2
3f6d67a1
3f6d8d2d
3f6db293
3f6dd7d5
3f6dfcf2
3f6e21eb
3f6e46be
3f6e6b6d
3f6e8ff8
3f6eb45d
3f6ed89e
3f6efcba
3f6f20b0
3f6f4483
3f6f6830
3f6f8bb8
3f6faf1b
3f6fd25a
3f6ff573
3f701867
3f703b37
3f705de1
3f708066
3f70a2c6
3f70c501
3f70e717
3f710908
3f712ad4
3f714c7a
3f716dfb
3f718f57
3f71b08e
3f71d19f
3f71f28c
3f721352
3f7233f4
3f725470
3f7274c7
3f7294f8
3f72b504
3f72d4eb
3f72f4ac
3f731447
3f7333be
3f73530e
3f737239
3f73913f
3f73b01f
3f73ced9
3f73ed6e
3f740bdd
3f742a27
3f74484b
3f746649
3f748422
3f74a1d5
3f74bf62
3f74dcc9
3f74fa0b
3f751727
3f75341d
3f7550ed
3f756d97
3f758a1c
3f75a67b
3f75c2b3
3f75dec6
3f75fab3
3f76167a
3f76321b
3f764d97
3f7668ec
3f76841b
3f769f24
3f76ba07
3f76d4c4
3f76ef5b
3f7709cc
3f772417
3f773e3c
3f77583a
3f777213
3f778bc5
3f77a551
3f77beb7
3f77d7f7
3f77f110
3f780a04
3f7822d1
3f783b77
3f7853f8
3f786c52
3f788486
3f789c93
3f78b47b
3f78cc3b
3f78e3d6
3f78fb4a
3f791298
3f7929bf
3f7940c0
3f79579a
3f796e4e
3f7984dc
3f799b43
3f79b183
3f79c79d
3f79dd91
3f79f35e
3f7a0904
3f7a1e84
3f7a33dd
3f7a4910
3f7a5e1c
3f7a7302
3f7a87c1
3f7a9c59
3f7ab0cb
3f7ac516
3f7ad93a
3f7aed37
3f7b010e
3f7b14be
3f7b2848
3f7b3bab
3f7b4ee7
3f7b61fc
3f7b74ea
3f7b87b2
3f7b9a53
3f7baccd
3f7bbf20
3f7bd14d
3f7be353
3f7bf531
3f7c06e9
3f7c187a
3f7c29e5
3f7c3b28
3f7c4c44
3f7c5d3a
3f7c6e08
3f7c7eb0
3f7c8f31
3f7c9f8a
3f7cafbd
3f7cbfc9
3f7ccfae
3f7cdf6c
3f7cef03
3f7cfe73
3f7d0dbc
3f7d1cdd
3f7d2bd8
3f7d3aac
3f7d4959
3f7d57de
3f7d663d
3f7d7474
3f7d8285
3f7d906e
3f7d9e30
3f7dabcc
3f7db940
3f7dc68c
3f7dd3b2
3f7de0b1
3f7ded88
3f7dfa38
3f7e06c2
3f7e1324
3f7e1f5e
3f7e2b72
3f7e375e
3f7e4323
3f7e4ec1
3f7e5a38
3f7e6588
3f7e70b0
3f7e7bb1
3f7e868b
3f7e913d
3f7e9bc9
3f7ea62d
3f7eb069
3f7eba7f
3f7ec46d
3f7ece34
3f7ed7d4
3f7ee14c
3f7eea9d
3f7ef3c7
3f7efcc9
3f7f05a4
3f7f0e58
3f7f16e4
3f7f1f49
3f7f2787
3f7f2f9d
3f7f378c
3f7f3f54
3f7f46f4
3f7f4e6d
3f7f55bf
3f7f5ce9
3f7f63ec
3f7f6ac7
3f7f717b
3f7f7808
3f7f7e6d
3f7f84ab
3f7f8ac2
3f7f90b1
3f7f9678
3f7f9c18
3f7fa191
3f7fa6e3
3f7fac0d
3f7fb10f
3f7fb5ea
3f7fba9e
3f7fbf2a
3f7fc38f
3f7fc7cc
3f7fcbe2
3f7fcfd1
3f7fd397
3f7fd737
3f7fdaaf
3f7fde00
3f7fe129
3f7fe42b
3f7fe705
3f7fe9b8
3f7fec43
3f7feea7
3f7ff0e3
3f7ff2f8
3f7ff4e6
3f7ff6ac
3f7ff84a
3f7ff9c1
3f7ffb11
3f7ffc39
3f7ffd39
3f7ffe13
3f7ffec4
3f7fff4e
3f7fffb1
3f7fffec
